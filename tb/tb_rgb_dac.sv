// tb_rgb_dac: self-checking test of the colour converter. Random colours,
// blanking and syncs go in; one cycle later every channel must be the 6-bit
// value scaled to 8 bits (c*4 + c/16), or 0 while blanked, and the syncs
// must come out delayed by the same cycle.
module tb_rgb_dac;
  import rt_pkg::*;

  logic       clk = 0;
  color_t     color;
  logic       blank, hsync_in, vsync_in;
  logic [7:0] vga_r, vga_g, vga_b;
  logic       hsync, vsync;

  rgb_dac dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lvl(int c);
    return c * 4 + c / 16;
  endfunction

  initial begin
    for (int k = 0; k < 3000; k++) begin
      color    = color_t'($urandom);
      if (k < 64) color = '{r: 6'(k), g: 6'(63 - k), b: 6'(k)};
      blank    = ($urandom % 4 == 0);
      hsync_in = $urandom % 2;
      vsync_in = $urandom % 2;
      @(posedge clk);
      #1;
      checks++;
      if (int'(vga_r) != (blank ? 0 : lvl(color.r)) || int'(vga_g) != (blank ? 0 : lvl(color.g))
          || int'(vga_b) != (blank ? 0 : lvl(color.b)) || hsync != hsync_in || vsync != vsync_in) begin
        failures++;
        $display("colour %h blank %0d -> %h %h %h", color, blank, vga_r, vga_g, vga_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
