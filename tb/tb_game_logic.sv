// tb_game_logic: self-checking test of the game logic. It types PS/2 scan
// code sequences for the arrow keys (press E0 xx, release E0 F0 xx), plus a
// non-extended code that must be ignored, and advances the world with
// frame_tick pulses. After every frame it compares the camera with a model
// (16 units per frame per held key, limited to +-512) and every triangle
// with the obstacle squares the model expects: four obstacles on a 3x3 grid
// of lanes, 96 units half-size, odd ones half mirror (reflectivity 4/8),
// moving 24 units closer per frame and sent
// back 1920 units once nearer than z = 64.
module tb_game_logic;
  import rt_pkg::*;

  localparam int NP = 8, NO = NP / 2;

  logic       clk = 0, rst = 1;
  logic [7:0] key_code = '0;
  logic       key_valid = 0, frame_tick = 0;
  vec3_t      cam;
  poly_t      polys [NP];
  unorm_t     light;
  logic [3:0] keys_held;
  logic       wrapped;

  game_logic #(.N_POLY(NP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, wraps = 0, moves = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ex, ey, oz [NO];
  logic kl, kr, ku, kd;

  task automatic send(logic [7:0] c);
    key_code = c; key_valid = 1;
    @(posedge clk); #1;
    key_valid = 0;
    repeat ($urandom % 4) @(posedge clk);
    #1;
  endtask

  task automatic press(logic [7:0] c);
    send(8'hE0); send(c);
  endtask

  task automatic release_key(logic [7:0] c);
    send(8'hE0); send(8'hF0); send(c);
  endtask

  function automatic int clampi(int v);
    return v > 512 ? 512 : (v < -512 ? -512 : v);
  endfunction

  task automatic check_world();
    checks++;
    if (int'(cam.x) != ex || int'(cam.y) != ey || cam.z != 0) begin
      failures++; $display("camera (%0d,%0d,%0d), expected (%0d,%0d,0)", cam.x, cam.y, cam.z, ex, ey);
    end
    checks++;
    if (keys_held != {ku, kd, kr, kl}) begin failures++; $display("keys_held %b", keys_held); end
    for (int k = 0; k < NO; k++) begin
      int cx, cy;
      cx = ((k * 5) % 3 - 1) * 320;
      cy = ((k * 7) % 3 - 1) * 240;
      for (int h = 0; h < 2; h++) begin
        poly_t p;
        p = polys[2*k+h];
        checks++;
        if (int'(p.v0.x) != cx - 96 || int'(p.v0.y) != cy - 96 || int'(p.v0.z) != oz[k]
            || int'(p.v1.x) != cx + 96 || int'(p.v1.y) != (h ? cy + 96 : cy - 96) || int'(p.v1.z) != oz[k]
            || int'(p.v2.x) != (h ? cx - 96 : cx + 96) || int'(p.v2.y) != cy + 96 || int'(p.v2.z) != oz[k]
            || p.n.x != 0 || p.n.y != 0 || int'(p.n.z) != -128
            || int'(p.refl) != ((k % 2 == 1) ? 4 : 0)) begin
          failures++;
          $display("obstacle %0d half %0d: v0=(%0d,%0d,%0d) expected z %0d", k, h, p.v0.x, p.v0.y, p.v0.z, oz[k]);
        end
      end
    end
    checks++;
    if (int'(light.x) != -52 || int'(light.y) != 52 || int'(light.z) != -105) begin
      failures++; $display("light wrong");
    end
  endtask

  task automatic tick();
    logic w;
    frame_tick = 1;
    @(posedge clk); #1;
    frame_tick = 0;
    ex = clampi(ex + (kr ? 16 : 0) - (kl ? 16 : 0));
    ey = clampi(ey + (ku ? 16 : 0) - (kd ? 16 : 0));
    if (kr || kl || ku || kd) moves++;
    w = 0;
    for (int k = 0; k < NO; k++) begin
      oz[k] -= 24;
      if (oz[k] < 64) begin oz[k] += 1920; w = 1; end
    end
    if (w) wraps++;
    checks++;
    if (wrapped != w) begin failures++; $display("wrapped=%0d expected %0d", wrapped, w); end
    repeat ($urandom % 5) @(posedge clk);
    #1;
    check_world();
  endtask

  initial begin
    ex = 0; ey = 0; kl = 0; kr = 0; ku = 0; kd = 0;
    for (int k = 0; k < NO; k++) oz[k] = 1984 - k * 480;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    check_world();
    press(8'h74); kr = 1;            // right
    repeat (5) tick();
    press(8'h75); ku = 1;            // up
    repeat (3) tick();
    release_key(8'h74); kr = 0;
    send(8'h6B);                     // keypad 4, not an arrow: ignored
    repeat (2) tick();
    release_key(8'h75); ku = 0;
    press(8'h6B); kl = 1;            // left until the limit
    repeat (45) tick();
    release_key(8'h6B); kl = 0;
    press(8'h72); kd = 1;            // down
    repeat (4) tick();
    release_key(8'h72); kd = 0;
    repeat (40) tick();
    checks++;
    if (wraps < 3 || ex != -512) begin failures++; $display("wraps=%0d ex=%0d", wraps, ex); end
    $display("frames with movement=%0d wraps=%0d", moves, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
