// tb_frame_buffer: self-checking test of the double-buffered frame store
// on a 16x6 screen with two behavioural ZBT SRAMs. Four frames are written,
// each in a random pixel order with random gaps. The test checks that
// frame_swap pulses exactly once, right after the last pixel of a frame,
// that the status bit flips with it, and then scans the display addresses
// and checks that rd_color returns every pixel of the frame just finished,
// ZBT_LAT+1 cycles after its hcount/vcount. Earlier frames stay untouched in
// the other SRAM until it is rewritten.
module tb_frame_buffer;
  import rt_pkg::*;

  localparam int HP = 16, VP = 6, LAT = 2;

  logic        clk = 0, rst = 1;
  logic        wr_valid = 0;
  pixel_t      wr_pix = '0;
  color_t      wr_color = '0;
  logic [10:0] hcount = '0;
  logic [9:0]  vcount = '0;
  logic        blank = 0;
  color_t      rd_color;
  logic        blank_out, rd_sel, frame_swap;
  logic [18:0] zbt_addr [2];
  logic        zbt_we   [2];
  logic [3:0]  zbt_bwe  [2];
  logic [35:0] zbt_wdata[2];
  logic [35:0] zbt_rdata[2];

  frame_buffer #(.H_PIX(HP), .V_PIX(VP), .ZBT_LAT(LAT)) dut (.*);

  for (genvar m = 0; m < 2; m++) begin : g_ram
    zbt_model u_ram (.clk, .addr(zbt_addr[m]), .we(zbt_we[m]), .bwe(zbt_bwe[m]),
                     .wdata(zbt_wdata[m]), .rdata(zbt_rdata[m]));
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, swaps = 0;
  always @(posedge clk) if (!rst && frame_swap) swaps++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  color_t img [HP*VP];
  int     order [HP*VP];

  initial begin
    logic sel0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 4; f++) begin
      sel0 = rd_sel;
      for (int i = 0; i < HP*VP; i++) begin order[i] = i; img[i] = color_t'($urandom); end
      order.shuffle();
      for (int i = 0; i < HP*VP; i++) begin
        while ($urandom % 3 == 0) begin
          wr_valid = 0;
          @(posedge clk); #1;
        end
        wr_valid = 1;
        wr_pix   = '{x: XW'(order[i] % HP), y: YW'(order[i] / HP)};
        wr_color = img[order[i]];
        @(posedge clk); #1;
        checks++;
        if ((i == HP*VP - 1) != frame_swap) begin
          failures++; $display("frame_swap=%0d after write %0d", frame_swap, i);
        end
      end
      wr_valid = 0;
      checks++;
      if (rd_sel == sel0) begin failures++; $display("status bit did not flip"); end
      repeat (LAT + 1) @(posedge clk);
      // display scan of the finished frame
      for (int p = 0; p < HP*VP + LAT; p++) begin
        if (p < HP*VP) begin
          hcount = 11'(p % HP);
          vcount = 10'(p / HP);
          blank  = (p % 5 == 0);
        end
        @(posedge clk); #1;
        if (p >= LAT) begin
          checks++;
          if (rd_color !== img[p - LAT] || blank_out !== ((p - LAT) % 5 == 0)) begin
            failures++;
            $display("frame %0d pixel %0d: read %h, expected %h", f, p - LAT, rd_color, img[p - LAT]);
          end
        end
      end
    end
    checks++;
    if (swaps != 4) begin failures++; $display("%0d swaps", swaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
