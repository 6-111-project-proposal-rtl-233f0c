// rt_game_top: a ray-traced 3D flying game. The player steers with the
// arrow keys past obstacles that fly towards them; every frame is rendered
// by ray tracing, spread over N_UNITS ray tracer units working in parallel.
//
// Data flow, per frame:
//   game_logic     turns key presses into the camera, triangles and light;
//   rt_input_seq   hands pixel after pixel to whichever rt_unit is free;
//   rt_unit (xN)   traces one pixel each: nearest triangle, shaded colour;
//   rt_output_seq  buffers one result per unit and drains one per cycle;
//   bg_processor   paints a sky gradient where a ray met nothing;
//   frame_buffer   writes the pixel into the back SRAM; after the last pixel
//                  of the frame it swaps front and back and tells the input
//                  sequencer (and the game logic) to start the next frame;
//   rgb_dac        turns the displayed 18-bit pixel into VGA colour levels.
// The display side runs independently: hcount/vcount/blank/hsync/vsync come
// from the board's VGA timing generator, and the two ZBT SRAMs and the PS/2
// keyboard interface are outside this module, reached through its ports.
//
// Timing. A pixel costs 4*N_POLY+2 cycles in a unit, so with every unit
// busy the renderer finishes about N_UNITS/(4*N_POLY+3) pixels per cycle.
// The VGA colour outputs lag hcount/vcount by ZBT_LAT+2 cycles; hsync and
// vsync are delayed to match.
//
// The block structure and its connections follow the project's block
// diagram. The number of units and triangles is not fixed by the project
// ("as many ray tracing modules as we can fit"); 4 and 8 are this design's
// defaults.
module rt_game_top
  import rt_pkg::*;
#(
  parameter int N_UNITS = 4,
  parameter int N_POLY  = 8,
  parameter int H_PIX   = H_RES,
  parameter int V_PIX   = V_RES,
  parameter int ZBT_LAT = 2
) (
  input  logic        clk,
  input  logic        rst,
  // PS/2 keyboard interface
  input  logic [7:0]  key_code,
  input  logic        key_valid,
  // VGA timing generator
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic        blank,
  input  logic        hsync,
  input  logic        vsync,
  // ZBT SRAMs
  output logic [18:0] zbt_addr [2],
  output logic        zbt_we   [2],
  output logic [3:0]  zbt_bwe  [2],
  output logic [35:0] zbt_wdata[2],
  input  logic [35:0] zbt_rdata[2],
  // video DAC
  output logic [7:0]  vga_r,
  output logic [7:0]  vga_g,
  output logic [7:0]  vga_b,
  output logic        vga_hsync,
  output logic        vga_vsync,
  // status
  output logic        frame_swap,
  output logic        rd_sel
);

  vec3_t   cam;
  poly_t   polys [N_POLY];
  unorm_t  light;
  logic [3:0] keys_held;
  logic       wrapped;

  game_logic #(.N_POLY(N_POLY)) u_game (
    .clk, .rst, .key_code, .key_valid, .frame_tick(frame_swap),
    .cam, .polys, .light, .keys_held, .wrapped
  );

  logic [N_UNITS-1:0] busy, start, done, ack;
  pixel_t             pix;
  logic               seq_waiting;
  result_t            res [N_UNITS];

  rt_input_seq #(.N_UNITS(N_UNITS), .H_PIX(H_PIX), .V_PIX(V_PIX)) u_in_seq (
    .clk, .rst, .busy, .frame_swap, .start, .pix, .waiting(seq_waiting)
  );

  for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
    rt_unit #(.N_POLY(N_POLY)) u_rt (
      .clk, .rst, .start(start[i]), .pix, .cam, .polys, .light,
      .busy(busy[i]), .done(done[i]), .result(res[i]), .ack(ack[i])
    );
  end

  logic               os_valid;
  result_t            os_res;
  logic [N_UNITS-1:0] occupancy;

  rt_output_seq #(.N_UNITS(N_UNITS)) u_out_seq (
    .clk, .rst, .done, .res, .ack, .out_valid(os_valid), .out_res(os_res), .occupancy
  );

  logic   bg_valid;
  color_t bg_color;
  pixel_t bg_pix;

  bg_processor u_bg (
    .clk, .rst, .in_valid(os_valid), .in_res(os_res),
    .out_valid(bg_valid), .out_color(bg_color), .out_pix(bg_pix)
  );

  color_t fb_color;
  logic   fb_blank;

  frame_buffer #(.H_PIX(H_PIX), .V_PIX(V_PIX), .ZBT_LAT(ZBT_LAT)) u_fb (
    .clk, .rst, .wr_valid(bg_valid), .wr_pix(bg_pix), .wr_color(bg_color),
    .hcount, .vcount, .blank, .rd_color(fb_color), .blank_out(fb_blank),
    .rd_sel, .frame_swap, .zbt_addr, .zbt_we, .zbt_bwe, .zbt_wdata, .zbt_rdata
  );

  // Sync delay to match the frame buffer read latency.
  logic [ZBT_LAT:0] hs_d, vs_d;
  always_ff @(posedge clk) begin
    hs_d <= {hs_d[ZBT_LAT-1:0], hsync};
    vs_d <= {vs_d[ZBT_LAT-1:0], vsync};
  end

  rgb_dac u_dac (
    .clk, .color(fb_color), .blank(fb_blank),
    .hsync_in(hs_d[ZBT_LAT]), .vsync_in(vs_d[ZBT_LAT]),
    .vga_r, .vga_g, .vga_b, .hsync(vga_hsync), .vsync(vga_vsync)
  );

endmodule
