// rt_input_seq: ray tracer input sequencer. It walks an x/y counter over the
// screen in raster order and hands each pixel to a free ray tracer unit.
//
// How it works. Every cycle the sequencer looks at the busy flags of the
// N_UNITS units, picks the lowest-numbered one that is not busy and raises
// that unit's start bit with the current (x, y) on pix. The counter then
// steps: x counts up to H_RES-1, then returns to 0 while y steps down a row.
// After the last pixel of the screen has been handed out, the sequencer
// stops issuing and waits for frame_swap from the frame buffer, which says
// the finished frame is now on display; it then resets its counters and
// starts the next frame.
//
// Timing. start is combinational from the registered counters and the
// units' busy flags: a unit must raise busy in the cycle after its start
// (rt_unit does). At most one pixel is issued per cycle, and one is issued
// in every cycle in which some unit is free.
//
// All of this follows the project description (first non-busy unit, x and y
// counters, wait for the frame switch, a few registers only). The choice of
// the lowest-numbered free unit is this design's.
module rt_input_seq
  import rt_pkg::*;
#(
  parameter int N_UNITS = 4,
  parameter int H_PIX   = H_RES,
  parameter int V_PIX   = V_RES
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_UNITS-1:0] busy,
  input  logic               frame_swap,
  output logic [N_UNITS-1:0] start,
  output pixel_t             pix,
  output logic               waiting      // all pixels issued, waiting for frame_swap
);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          all_issued;
  logic          issue;

  always_comb begin
    start = '0;
    issue = 1'b0;
    if (!all_issued) begin
      for (int i = 0; i < N_UNITS; i++) begin
        if (!busy[i] && !issue) begin
          start[i] = 1'b1;
          issue    = 1'b1;
        end
      end
    end
  end

  assign pix         = '{x: x, y: y};
  assign waiting     = all_issued;

  always_ff @(posedge clk) begin
    if (rst) begin
      x          <= '0;
      y          <= '0;
      all_issued <= 1'b0;
    end else if (all_issued) begin
      if (frame_swap) begin
        x          <= '0;
        y          <= '0;
        all_issued <= 1'b0;
      end
    end else if (issue) begin
      if (32'(x) == H_PIX - 1) begin
        x <= '0;
        if (32'(y) == V_PIX - 1) all_issued <= 1'b1;
        else                     y <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  a_one_start: assert property (@(posedge clk) disable iff (rst) $onehot0(start));

endmodule
