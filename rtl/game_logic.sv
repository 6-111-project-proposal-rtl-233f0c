// game_logic: the game. The player flies into the screen and steers past
// square obstacles that come towards them; this block turns keyboard input
// into the camera, polygon and light data the renderer traces.
//
// Keyboard. Scan codes arrive from the PS/2 keyboard interface one byte at
// a time with key_valid. The arrow keys send E0 followed by their code when
// pressed and E0 F0 followed by their code when released (left 6B, right
// 74, up 75, down 72). A small decoder keeps one "held" bit per arrow key.
//
// World. The camera (the player's plane) sits at z = 0 and moves in x and y.
// There are N_POLY/2 obstacles, each a square of half-size OBST_HALF facing
// the camera and drawn as two triangles with normal (0, 0, -1); every other
// obstacle has reflectivity 4/8, the rest are matt. Once per
// frame, on frame_tick, the camera moves CAM_STEP units in the direction of
// every held arrow key (kept within +-CAM_LIMIT) and every obstacle moves
// SPEED units towards the camera; an obstacle that comes nearer than NEAR_Z
// is sent back by DEPTH_SPAN units, so the stream never ends. The light is a
// fixed direction, up-left and towards the viewer.
//
// The normals, colours and reflectivities of the triangles and the light
// direction are constants of the game, so those output bits never change.
//
// Timing. Outputs are registers or combinational from registers and change
// only in the cycle after frame_tick, so the renderer sees one consistent
// scene per frame when frame_tick is the frame buffer's frame_swap.
//
// The project description gives the role of this block (keyboard in;
// camera, polygon and light data out; objects as simple geometric shapes;
// a game in which obstacles fly at the player). The obstacle layout,
// speeds, key handling and light direction are this design's choices.
// Collisions and scoring are not described and are not modelled.
module game_logic
  import rt_pkg::*;
#(
  parameter int N_POLY     = 8,
  parameter int CAM_STEP   = 16,
  parameter int CAM_LIMIT  = 512,
  parameter int SPEED      = 24,
  parameter int OBST_HALF  = 96,
  parameter int NEAR_Z     = 64,
  parameter int DEPTH_SPAN = 1920
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] key_code,
  input  logic       key_valid,
  input  logic       frame_tick,
  output vec3_t      cam,
  output poly_t      polys [N_POLY],
  output unorm_t     light,
  output logic [3:0] keys_held,       // {up, down, right, left}
  output logic       wrapped          // an obstacle was sent back this frame
);

  localparam int N_OBST = N_POLY / 2;
  localparam logic [7:0] K_EXT   = 8'hE0;
  localparam logic [7:0] K_BREAK = 8'hF0;
  localparam logic [7:0] K_LEFT  = 8'h6B;
  localparam logic [7:0] K_RIGHT = 8'h74;
  localparam logic [7:0] K_UP    = 8'h75;
  localparam logic [7:0] K_DOWN  = 8'h72;

  typedef logic signed [COORD_W-1:0] coord_t;

  localparam unorm_t FACE_N = '{x: '0, y: '0, z: NORM_W'(-UNIT)};

  // Starting place and colour of obstacle k: spread over a 3x3 grid of
  // lanes and evenly in depth.
  function automatic vec3_t obst_home(int k);
    vec3_t p;
    p.x = coord_t'(((k * 5) % 3 - 1) * 320);
    p.y = coord_t'(((k * 7) % 3 - 1) * 240);
    p.z = coord_t'(NEAR_Z + DEPTH_SPAN - (k * DEPTH_SPAN) / N_OBST);
    return p;
  endfunction

  function automatic color_t obst_color(int k);
    color_t c;
    c.r = (k % 3 == 0) ? 6'd63 : 6'd20;
    c.g = (k % 3 == 1) ? 6'd63 : 6'd20;
    c.b = (k % 3 == 2) ? 6'd63 : 6'd20;
    return c;
  endfunction

  // Every other obstacle is half mirror.
  function automatic logic [2:0] obst_refl(int k);
    return (k % 2 == 1) ? 3'd4 : 3'd0;
  endfunction

  // Keyboard decoder.
  logic ext, brk;
  always_ff @(posedge clk) begin
    if (rst) begin
      ext       <= 1'b0;
      brk       <= 1'b0;
      keys_held <= '0;
    end else if (key_valid) begin
      if (key_code == K_EXT)        ext <= 1'b1;
      else if (key_code == K_BREAK) brk <= 1'b1;
      else begin
        if (ext) begin
          case (key_code)
            K_LEFT:  keys_held[0] <= !brk;
            K_RIGHT: keys_held[1] <= !brk;
            K_DOWN:  keys_held[2] <= !brk;
            K_UP:    keys_held[3] <= !brk;
            default: ;
          endcase
        end
        ext <= 1'b0;
        brk <= 1'b0;
      end
    end
  end

  // World state, stepped once per frame.
  vec3_t obst [N_OBST];

  function automatic coord_t clamp_cam(int v);
    if (v >  CAM_LIMIT) return coord_t'(CAM_LIMIT);
    if (v < -CAM_LIMIT) return coord_t'(-CAM_LIMIT);
    return coord_t'(v);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      cam     <= '0;
      wrapped <= 1'b0;
      for (int k = 0; k < N_OBST; k++) obst[k] <= obst_home(k);
    end else if (frame_tick) begin
      cam.x   <= clamp_cam(int'(cam.x) + (keys_held[1] ? CAM_STEP : 0) - (keys_held[0] ? CAM_STEP : 0));
      cam.y   <= clamp_cam(int'(cam.y) + (keys_held[3] ? CAM_STEP : 0) - (keys_held[2] ? CAM_STEP : 0));
      wrapped <= 1'b0;
      for (int k = 0; k < N_OBST; k++) begin
        if (int'(obst[k].z) - SPEED < NEAR_Z) begin
          obst[k].z <= coord_t'(int'(obst[k].z) - SPEED + DEPTH_SPAN);
          wrapped   <= 1'b1;
        end else begin
          obst[k].z <= coord_t'(int'(obst[k].z) - SPEED);
        end
      end
    end
  end

  // Each obstacle as two triangles.
  always_comb begin
    for (int k = 0; k < N_POLY; k++) polys[k] = '0;
    for (int k = 0; k < N_OBST; k++) begin
      vec3_t a, b, c, d;
      a = '{x: obst[k].x - coord_t'(OBST_HALF), y: obst[k].y - coord_t'(OBST_HALF), z: obst[k].z};
      b = '{x: obst[k].x + coord_t'(OBST_HALF), y: obst[k].y - coord_t'(OBST_HALF), z: obst[k].z};
      c = '{x: obst[k].x + coord_t'(OBST_HALF), y: obst[k].y + coord_t'(OBST_HALF), z: obst[k].z};
      d = '{x: obst[k].x - coord_t'(OBST_HALF), y: obst[k].y + coord_t'(OBST_HALF), z: obst[k].z};
      polys[2*k]   = '{v0: a, v1: b, v2: c, n: FACE_N, color: obst_color(k), refl: obst_refl(k)};
      polys[2*k+1] = '{v0: a, v1: c, v2: d, n: FACE_N, color: obst_color(k), refl: obst_refl(k)};
    end
  end

  // Unit vector towards the light: (-1, 1, -2) normalised, 1.0 = UNIT.
  assign light = '{x: -9'sd52, y: 9'sd52, z: -9'sd105};

endmodule
