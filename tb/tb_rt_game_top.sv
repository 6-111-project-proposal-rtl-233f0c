// tb_rt_game_top: end-to-end test of the whole game renderer at its default
// size (1024x768 screen, 4 ray tracer units, 8 triangles), with two
// behavioural ZBT SRAMs, a 1024x768 VGA timing generator and a keyboard
// that holds the right arrow key during the first frame.
//
// Two complete frames are rendered. When a frame finishes (frame_swap), every
// one of its 786,432 pixels is read back from the SRAM now on display and
// compared with the floating-point reference tracer, fed with the scene the
// game logic held while the frame was drawn; missed pixels must carry the
// sky gradient. While the second frame is drawn, the VGA colour and sync
// outputs are compared with the first frame for every scanned pixel.
// The second frame must show the camera moved by the key press.
// It also counts, and requires at least once: a cycle with every unit busy
// and pixels left (issue stall), a result parked in an output slot,
// background and hit pixels, the input sequencer waiting for the swap,
// and a frame swap. Cycles with several output slots full are reported but
// not required: the units all take the same number of cycles and are started
// one per cycle, so in this configuration they never finish together.
module tb_rt_game_top;
  import rt_pkg::*;
  import rt_ref_pkg::*;

  localparam int NPIX = H_RES * V_RES;
  localparam int NU   = 4;
  localparam int NPL  = 8;

  logic        clk = 0, rst = 1;
  logic [7:0]  key_code = '0;
  logic        key_valid = 0;
  logic [10:0] hcount = '0;
  logic [9:0]  vcount = '0;
  logic        blank, hsync, vsync;
  logic [18:0] zbt_addr [2];
  logic        zbt_we   [2];
  logic [3:0]  zbt_bwe  [2];
  logic [35:0] zbt_wdata[2];
  logic [35:0] zbt_rdata[2];
  logic [7:0]  vga_r, vga_g, vga_b;
  logic        vga_hsync, vga_vsync;
  logic        frame_swap, rd_sel;

  rt_game_top dut (.*);

  for (genvar m = 0; m < 2; m++) begin : g_ram
    zbt_model u_ram (.clk, .addr(zbt_addr[m]), .we(zbt_we[m]), .bwe(zbt_bwe[m]),
                     .wdata(zbt_wdata[m]), .rdata(zbt_rdata[m]));
  end

  always #5 clk = ~clk;

  // 1024x768 VGA timing: 1344 clocks per line, 806 lines per frame
  always_ff @(posedge clk) begin
    if (hcount == 11'd1343) begin
      hcount <= '0;
      vcount <= (vcount == 10'd805) ? '0 : vcount + 1'b1;
    end else hcount <= hcount + 1'b1;
  end
  assign blank = (hcount >= 11'd1024) || (vcount >= 10'd768);
  assign hsync = !((hcount >= 11'd1048) && (hcount < 11'd1184));
  assign vsync = !((vcount >= 10'd771) && (vcount < 10'd777));

  int checks = 0, failures = 0, skipped = 0;
  longint n_stall = 0, n_contend = 0, n_buf = 0, n_bg = 0, n_hit = 0, n_wait = 0, n_swap = 0, n_disp = 0, n_refl = 0, n_refl_hit = 0;

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (!dut.seq_waiting && dut.busy == '1) n_stall++;
    if ($countones(dut.occupancy) > 1) n_contend++;
    if (dut.occupancy != '0) n_buf++;
    if (dut.os_valid && dut.os_res.hit) n_hit++;
    if (dut.os_valid && !dut.os_res.hit) n_bg++;
    if (dut.seq_waiting) n_wait++;
    if (frame_swap) n_swap++;
  end

  color_t exp_img [NPIX];

  function automatic color_t sky(int x, int y);
    color_t c;
    c.r = 6'(x / 32);
    c.g = 6'(y / 16);
    c.b = 6'(63 - y / 16);
    return c;
  endfunction

  // scene the game logic holds while a frame is drawn
  vec3_t  s_cam;
  poly_t  s_polys [$];
  unorm_t s_light;

  task automatic capture_scene();
    s_cam   = dut.cam;
    s_light = dut.light;
    s_polys = {};
    for (int i = 0; i < NPL; i++) s_polys.push_back(dut.polys[i]);
  endtask

  task automatic check_frame(int f);
    int bad, m;
    m = rd_sel;
    bad = 0;
    for (int y = 0; y < V_RES; y++) begin
      for (int x = 0; x < H_RES; x++) begin
        ref_t   r;
        logic [35:0] w;
        color_t got, want;
        r = trace(s_cam, s_polys, s_light, x, y, 512, 32);
        want = r.hit ? r.color : sky(x, y);
        w = (m == 0) ? g_ram[0].u_ram.mem[{y[9:0], x[9:1]}] : g_ram[1].u_ram.mem[{y[9:0], x[9:1]}];
        got = x[0] ? w[17:0] : w[35:18];
        exp_img[y * H_RES + x] = r.ambiguous ? got : want;
        if (!r.ambiguous && r.reflected) n_refl++;
        if (!r.ambiguous && r.reflected && r.sec_hit) n_refl_hit++;
        if (r.ambiguous) begin skipped++; continue; end
        checks++;
        if (got !== want) begin
          failures++;
          if (bad++ < 10) $display("frame %0d pixel (%0d,%0d): %h, expected %h", f, x, y, got, want);
        end
      end
    end
  endtask

  // display path: VGA outputs lag hcount/vcount by 4 clocks
  typedef struct { int h, v; logic bl, hs, vs, sel; } disp_t;
  disp_t hist [5];
  logic  disp_on = 0;
  logic  disp_sel;
  int    disp_bad = 0;
  always @(negedge clk) begin
    for (int i = 4; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = '{h: int'(hcount), v: int'(vcount), bl: blank, hs: hsync, vs: vsync, sel: rd_sel};
    if (disp_on && hist[4].sel == disp_sel) begin
      logic [7:0] er, eg, eb;
      color_t c;
      if (hist[4].bl) begin er = 0; eg = 0; eb = 0; end
      else begin
        c = exp_img[hist[4].v * H_RES + hist[4].h];
        er = {c.r, c.r[5:4]}; eg = {c.g, c.g[5:4]}; eb = {c.b, c.b[5:4]};
        n_disp++;
      end
      checks++;
      if (vga_r !== er || vga_g !== eg || vga_b !== eb || vga_hsync !== hist[4].hs || vga_vsync !== hist[4].vs) begin
        failures++;
        if (disp_bad++ < 10)
          $display("VGA at (%0d,%0d): %h %h %h, expected %h %h %h", hist[4].h, hist[4].v, vga_r, vga_g, vga_b, er, eg, eb);
      end
    end
  end

  task automatic send(logic [7:0] c);
    @(negedge clk);
    key_code = c; key_valid = 1;
    @(negedge clk);
    key_valid = 0;
  endtask

  initial begin
    vec3_t cam1;
    longint t0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    capture_scene();
    cam1 = s_cam;
    send(8'hE0); send(8'h74);     // hold the right arrow
    for (int f = 1; f <= 2; f++) begin
      t0 = longint'($time / 10);
      @(posedge clk iff frame_swap);
      $display("frame %0d rendered in %0d cycles", f, longint'($time / 10) - t0);
      repeat (4) @(posedge clk);
      #1;
      check_frame(f);
      if (f == 1) begin
        capture_scene();
        checks++;
        if (int'(s_cam.x) != int'(cam1.x) + 16) begin
          failures++; $display("camera did not follow the key: %0d -> %0d", cam1.x, s_cam.x);
        end
        disp_sel = rd_sel;
        disp_on  = 1;
      end else disp_on = 0;
    end
    $display("reflected=%0d (meeting a triangle %0d)", n_refl, n_refl_hit);
    $display("buffered=%0d stall=%0d contended=%0d hit=%0d background=%0d wait=%0d swaps=%0d displayed=%0d skipped=%0d",
             n_buf, n_stall, n_contend, n_hit, n_bg, n_wait, n_swap, n_disp, skipped);
    checks++; if (n_stall == 0)   begin failures++; $display("no issue stall"); end
    checks++; if (n_buf == 0)     begin failures++; $display("no result buffered"); end
    checks++; if (n_refl == 0)    begin failures++; $display("no reflection traced"); end
    checks++; if (n_hit == 0)     begin failures++; $display("no hit pixel"); end
    checks++; if (n_bg == 0)      begin failures++; $display("no background pixel"); end
    checks++; if (n_wait == 0)    begin failures++; $display("sequencer never waited"); end
    checks++; if (n_swap != 2)    begin failures++; $display("%0d swaps", n_swap); end
    checks++; if (n_disp < NPIX)  begin failures++; $display("displayed only %0d pixels", n_disp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
