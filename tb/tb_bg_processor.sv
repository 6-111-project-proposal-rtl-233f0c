// tb_bg_processor: self-checking test of the background processor. Random
// results, hit and miss, are streamed in at full rate with random gaps; each
// output one cycle later must be the traced colour for a hit and the sky
// gradient (red x/32, green y/16, blue 63-y/16) for a miss.
module tb_bg_processor;
  import rt_pkg::*;

  logic    clk = 0, rst = 1;
  logic    in_valid = 0;
  result_t in_res = '0;
  logic    out_valid;
  color_t  out_color;
  pixel_t  out_pix;

  bg_processor dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_bg = 0, n_hit = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic    pv;
    result_t pr;
    color_t  want;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int k = 0; k < 5000; k++) begin
      in_valid = ($urandom % 5 != 0);
      in_res.color = color_t'($urandom);
      in_res.hit   = $urandom % 2;
      in_res.x     = XW'($urandom % H_RES);
      in_res.y     = YW'($urandom % V_RES);
      pv = in_valid;
      pr = in_res;
      @(posedge clk);
      #1;
      if (pr.hit) want = pr.color;
      else begin
        want.r = 6'(int'(pr.x) / 32);
        want.g = 6'(int'(pr.y) / 16);
        want.b = 6'(63 - int'(pr.y) / 16);
      end
      begin
        checks++;
        if (out_valid !== pv || (pv && (out_color !== want || out_pix.x !== pr.x || out_pix.y !== pr.y))) begin
          failures++;
          $display("got %0d %h (%0d,%0d), expected %0d %h (%0d,%0d)", out_valid, out_color,
                   out_pix.x, out_pix.y, pv, want, pr.x, pr.y);
        end
        if (pv && pr.hit) n_hit++;
        if (pv && !pr.hit) n_bg++;
      end
    end
    checks++;
    if (n_bg == 0 || n_hit == 0) begin failures++; $display("hits or background never seen"); end
    $display("hits=%0d background=%0d", n_hit, n_bg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
