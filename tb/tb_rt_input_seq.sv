// tb_rt_input_seq: self-checking test of the input sequencer on a small
// 7x5 screen with three model units. Each model unit raises busy the cycle
// after its start and stays busy for a random 1..12 cycles. The test checks
// that every cycle with a free unit issues exactly one pixel to the
// lowest-numbered free unit, that pixels come in raster order, that nothing
// is issued between the last pixel and frame_swap, and that the next frame
// restarts at (0,0). Three frames are run.
module tb_rt_input_seq;
  import rt_pkg::*;

  localparam int NU = 3, HP = 7, VP = 5;

  logic          clk = 0, rst = 1;
  logic [NU-1:0] busy, start;
  logic          frame_swap = 0;
  pixel_t        pix;
  logic          waiting;

  rt_input_seq #(.N_UNITS(NU), .H_PIX(HP), .V_PIX(VP)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int remain [NU];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model units
  always_comb for (int i = 0; i < NU; i++) busy[i] = (remain[i] != 0);
  always_ff @(posedge clk) begin
    for (int i = 0; i < NU; i++) begin
      if (rst) remain[i] <= 0;
      else if (start[i]) remain[i] <= 1 + int'($urandom % 12);
      else if (remain[i] != 0) remain[i] <= remain[i] - 1;
    end
  end

  int ex, ey, issued, stalls;

  initial begin
    ex = 0; ey = 0; stalls = 0;
    repeat (3) @(posedge clk);
    @(posedge clk);
    #1 rst = 0;
    for (int f = 0; f < 3; f++) begin
      issued = 0;
      while (issued < HP * VP) begin
        @(negedge clk);
        checks++;
        if (busy == '1) begin
          stalls++;
          if (start != '0) begin failures++; $display("start while all busy"); end
        end else begin
          logic [NU-1:0] want;
          want = '0;
          for (int i = NU - 1; i >= 0; i--) if (!busy[i]) want = NU'(1) << i;
          if (start != want) begin failures++; $display("start=%b busy=%b", start, busy); end
          if (int'(pix.x) != ex || int'(pix.y) != ey) begin
            failures++; $display("pixel (%0d,%0d), expected (%0d,%0d)", pix.x, pix.y, ex, ey);
          end
          issued++;
          ex++;
          if (ex == HP) begin ex = 0; ey++; end
        end
      end
      // all issued: no more starts until frame_swap
      repeat (20) begin
        @(negedge clk);
        checks++;
        if (start != '0 || !waiting) begin failures++; $display("issued past the frame end"); end
      end
      frame_swap = 1;
      @(posedge clk);
      #1 frame_swap = 0;
      ex = 0; ey = 0;
    end
    checks++;
    if (stalls == 0) begin failures++; $display("never stalled"); end
    $display("stall cycles=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
