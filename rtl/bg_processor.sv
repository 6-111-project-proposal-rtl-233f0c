// bg_processor: background image processor. It sits between the output
// sequencer and the frame buffer and paints a background into every pixel
// whose ray met no polygon.
//
// How it works. A result with hit = 1 passes through unchanged. A result
// with hit = 0 gets a colour computed from its screen position alone, a
// vertical sky gradient: with s = y/16 (0 at the top row, 47 at the bottom),
// red = x/32 (0..31), green = s and blue = 63 - s. Only shifts and one
// subtraction are needed, so there is no storage and no long-latency step.
//
// Timing. One register stage: a result entering with in_valid leaves one
// cycle later with out_valid, one per cycle at full rate.
//
// The project description fixes the position of this block, the use of the
// hit bit, and that the colour is generated from (x, y) with no storage;
// the gradient itself is this design's choice.
module bg_processor
  import rt_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  result_t       in_res,
  output logic          out_valid,
  output color_t        out_color,
  output pixel_t        out_pix
);

  function automatic color_t sky(logic [XW-1:0] x, logic [YW-1:0] y);
    color_t c;
    c.r = chan_t'(x >> 5);
    c.g = chan_t'(y >> 4);
    c.b = 6'd63 - chan_t'(y >> 4);
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_color <= '0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= '{x: in_res.x, y: in_res.y};
      out_color <= in_res.hit ? in_res.color : sky(in_res.x, in_res.y);
    end
  end

endmodule
