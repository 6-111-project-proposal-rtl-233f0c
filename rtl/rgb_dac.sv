// rgb_dac: 18-bit RGB to VGA colour levels. It takes the 6-bit-per-channel
// colour read from the frame buffer and drives the board's video DAC, whose
// inputs are 8 bits per channel; the DAC chip then makes the analog
// red, green and blue voltages for the VGA connector.
//
// How it works. Each 6-bit channel c is widened to 8 bits as {c, c[5:4]},
// so 0 maps to 0 and 63 to 255 with even steps in between. While blank is
// high the outputs are forced to 0, as VGA requires outside the visible
// area. hsync and vsync go through the same single register so that they
// stay aligned with the colour.
//
// Timing: one register stage, one pixel per cycle.
//
// The 18-bit input and the per-channel conversion follow the project
// description. The 8-bit DAC interface and the blanking are this design's
// assumptions about the board; the analog conversion itself is done by the
// DAC chip outside this logic.
module rgb_dac
  import rt_pkg::*;
(
  input  logic       clk,
  input  color_t     color,
  input  logic       blank,
  input  logic       hsync_in,
  input  logic       vsync_in,
  output logic [7:0] vga_r,
  output logic [7:0] vga_g,
  output logic [7:0] vga_b,
  output logic       hsync,
  output logic       vsync
);

  function automatic logic [7:0] widen(chan_t c);
    return {c, c[5:4]};
  endfunction

  always_ff @(posedge clk) begin
    vga_r <= blank ? 8'd0 : widen(color.r);
    vga_g <= blank ? 8'd0 : widen(color.g);
    vga_b <= blank ? 8'd0 : widen(color.b);
    hsync <= hsync_in;
    vsync <= vsync_in;
  end

endmodule
