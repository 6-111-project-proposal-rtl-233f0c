// tb_rt_unit: self-checking test of one ray tracer unit. Random scenes of
// N triangles (random vertices in front of the camera, unit normals from a
// small table, about half of them reflective) are traced for random pixels
// and for a pixel grid; each result is compared with the floating-point
// reference, and the start-to-done latency is checked: 4*N_POLY+2 cycles,
// or 8*N_POLY+QW+3 when the primary hit is reflective. The unit's done is
// acknowledged after a random delay to exercise the hold. The test requires
// reflected rays that hit and that miss.
module tb_rt_unit;
  import rt_pkg::*;
  import rt_ref_pkg::*;

  localparam int N = 6;
  localparam int LAT  = 4 * N + 2;
  localparam int LATR = 8 * N + 24 + 3;

  logic    clk = 0, rst = 1;
  logic    start = 0, ack = 0;
  pixel_t  pix;
  vec3_t   cam;
  poly_t   polys [N];
  unorm_t  light;
  logic    busy, done;
  result_t result;

  rt_unit #(.N_POLY(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, skipped = 0, hits = 0, misses = 0, refl_hit = 0, refl_miss = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  unorm_t ntab [4] = '{'{x: 0, y: 0, z: -128}, '{x: -52, y: 52, z: -105},
                       '{x: 90, y: 0, z: -90}, '{x: 0, y: -128, z: 0}};

  function automatic logic signed [COORD_W-1:0] rnd(int lo, int hi);
    return (COORD_W)'(lo + int'($urandom % (hi - lo + 1)));
  endfunction

  task automatic new_scene();
    cam = '{x: rnd(-100, 100), y: rnd(-100, 100), z: rnd(-50, 50)};
    light = ntab[$urandom % 4];
    for (int i = 0; i < N; i++) begin
      int cx, cy, cz;
      cx = $urandom % 1200; cx -= 600;
      cy = $urandom % 900;  cy -= 450;
      cz = 200 + $urandom % 1500;
      polys[i].v0 = '{x: rnd(cx - 500, cx + 500), y: rnd(cy - 400, cy + 400), z: rnd(cz - 150, cz + 150)};
      polys[i].v1 = '{x: rnd(cx - 500, cx + 500), y: rnd(cy - 400, cy + 400), z: rnd(cz - 150, cz + 150)};
      polys[i].v2 = '{x: rnd(cx - 500, cx + 500), y: rnd(cy - 400, cy + 400), z: rnd(cz - 150, cz + 150)};
      polys[i].n  = ntab[$urandom % 4];
      polys[i].color = color_t'($urandom);
      polys[i].refl  = ($urandom % 2) ? 3'($urandom) : 3'd0;
    end
  endtask

  // A tilted mirror in the middle of the view sends the reflected rays
  // sideways, into a cluster of triangles off to the right.
  task automatic mirror_scene();
    cam = '{x: 0, y: 0, z: 0};
    light = ntab[1];
    polys[0].v0 = '{x: -400, y: -400, z: 800};
    polys[0].v1 = '{x: 400, y: -400, z: 800};
    polys[0].v2 = '{x: 0, y: 400, z: 800};
    polys[0].n  = ntab[2];
    polys[0].color = color_t'($urandom);
    polys[0].refl  = 3'(1 + $urandom % 7);
    for (int i = 1; i < N; i++) begin
      polys[i].v0 = '{x: rnd(700, 1500), y: rnd(-500, 500), z: rnd(200, 1400)};
      polys[i].v1 = '{x: rnd(700, 1500), y: rnd(-500, 500), z: rnd(200, 1400)};
      polys[i].v2 = '{x: rnd(700, 1500), y: rnd(-500, 500), z: rnd(200, 1400)};
      polys[i].n  = ntab[$urandom % 4];
      polys[i].color = color_t'($urandom);
      polys[i].refl  = 3'($urandom);
    end
  endtask

  task automatic trace_one(int x, int y);
    int cyc;
    poly_t q[$];
    ref_t r;
    @(negedge clk);
    pix = '{x: XW'(x), y: YW'(y)};
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not raised"); end
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 0; i < N; i++) q.push_back(polys[i]);
    r = trace(cam, q, light, x, y, 512, 32);
    if (!r.ambiguous) begin
      checks++;
      if (cyc != (r.reflected ? LATR : LAT)) begin
        failures++; $display("latency %0d, expected %0d", cyc, r.reflected ? LATR : LAT);
      end
    end
    repeat ($urandom % 3) begin
      @(negedge clk);
      checks++;
      if (!done || !busy) begin failures++; $display("done not held"); end
    end
    if (r.ambiguous) skipped++;
    else begin
      checks++;
      if (r.hit) hits++; else misses++;
      if (r.reflected && r.sec_hit) refl_hit++;
      if (r.reflected && !r.sec_hit) refl_miss++;
      if (result.hit !== r.hit || result.color !== r.color || result.x != XW'(x) || result.y != YW'(y)) begin
        failures++;
        $display("pixel (%0d,%0d): got hit=%0d col=%h at (%0d,%0d), expected hit=%0d col=%h",
                 x, y, result.hit, result.color, result.x, result.y, r.hit, r.color);
      end
    end
    ack = 1;
    @(negedge clk);
    ack = 0;
    checks++;
    if (busy || done) begin failures++; $display("unit not idle after ack"); end
  endtask

  initial begin
    pix = '0;
    new_scene();
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 30; s++) begin
      new_scene();
      for (int k = 0; k < 40; k++) trace_one($urandom % H_RES, $urandom % V_RES);
    end
    for (int s = 0; s < 10; s++) begin
      mirror_scene();
      for (int k = 0; k < 40; k++) trace_one(312 + $urandom % 400, 184 + $urandom % 400);
    end
    new_scene();
    for (int y = 0; y < V_RES; y += 48)
      for (int x = 0; x < H_RES; x += 32) trace_one(x, y);
    $display("hits=%0d misses=%0d skipped=%0d reflected: hit=%0d miss=%0d", hits, misses, skipped, refl_hit, refl_miss);
    checks++;
    if (refl_hit < 5 || refl_miss < 5) begin failures++; $display("too few reflections"); end
    checks++;
    if (hits < 50 || misses < 50) begin failures++; $display("too few hits or misses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
