// frame_buffer: double-buffered frame store over the board's two ZBT SRAMs.
// One SRAM holds the frame being drawn by the renderer, the other the frame
// being shown on the monitor; a status bit says which is which.
//
// Memory layout. Each ZBT SRAM is 512K words of 36 bits with four 9-bit
// byte-write lanes. Two 18-bit pixels share a word: pixel (x, y) lives at
// address {y, x[9:1]}, even x in bits 35:18 and odd x in bits 17:0, and a
// write enables only the two lanes of its half. A 1024x768 frame fills
// 384K words of one SRAM.
//
// Writing. Each wr_valid cycle writes one pixel to the SRAM selected as the
// write buffer. The pixels arrive in any order; the block counts them, and
// when the H_PIX*V_PIX-th pixel of the frame has been written it flips the
// status bit (rd_sel) and pulses frame_swap for one cycle, telling the input
// sequencer to start the next frame.
//
// Reading. hcount/vcount from the VGA timing generator address the read
// SRAM every cycle. The SRAMs are pipelined ZBT parts: write data is driven
// ZBT_LAT cycles after its address, and read data returns ZBT_LAT cycles
// after its address. The word half and the buffer select travel along a
// matching delay line, and the chosen pixel is registered, so rd_color (and
// blank_out, a copy of blank) lag hcount/vcount by ZBT_LAT+1 cycles.
//
// Two frames in two separate ZBT SRAMs, the status bit, and flipping it with
// a signal to the input sequencer when the last pixel is written follow the
// project description. The SRAM size, two-pixel packing, the latency and the
// write counter are this design's. As described, the swap is not held back
// to vertical blanking, so a swap in mid-scan shows one torn frame.
module frame_buffer
  import rt_pkg::*;
#(
  parameter int H_PIX   = H_RES,
  parameter int V_PIX   = V_RES,
  parameter int ZBT_LAT = 2,
  parameter int AW      = 19       // ZBT address width (512K words)
) (
  input  logic          clk,
  input  logic          rst,
  // pixel writes from the background processor
  input  logic          wr_valid,
  input  pixel_t        wr_pix,
  input  color_t        wr_color,
  // display reads from the VGA timing generator
  input  logic [10:0]   hcount,
  input  logic [9:0]    vcount,
  input  logic          blank,
  output color_t        rd_color,
  output logic          blank_out,
  // status
  output logic          rd_sel,        // SRAM holding the displayed frame
  output logic          frame_swap,
  // ZBT SRAM 0 and 1
  output logic [AW-1:0] zbt_addr [2],
  output logic          zbt_we   [2],
  output logic [3:0]    zbt_bwe  [2],
  output logic [35:0]   zbt_wdata[2],
  input  logic [35:0]   zbt_rdata[2]
);

  localparam int NPIX = H_PIX * V_PIX;

  logic [$clog2(NPIX+1)-1:0] wr_count;
  logic [AW-1:0] waddr, raddr;
  logic [3:0]    wbwe;

  assign waddr = AW'({wr_pix.y, wr_pix.x[XW-1:1]});
  assign raddr = AW'({vcount, hcount[XW-1:1]});
  assign wbwe  = wr_pix.x[0] ? 4'b0011 : 4'b1100;

  // Address/control: the write buffer is the SRAM not being read.
  always_comb begin
    for (int m = 0; m < 2; m++) begin
      if (rd_sel == m[0]) begin
        zbt_addr[m] = raddr;
        zbt_we[m]   = 1'b0;
        zbt_bwe[m]  = 4'b0000;
      end else begin
        zbt_addr[m] = waddr;
        zbt_we[m]   = wr_valid;
        zbt_bwe[m]  = wr_valid ? wbwe : 4'b0000;
      end
    end
  end

  // Write data follows its address by ZBT_LAT cycles; reads likewise.
  color_t wcol_d [ZBT_LAT];
  logic   half_d [ZBT_LAT];
  logic   sel_d  [ZBT_LAT];
  logic   blank_d[ZBT_LAT];

  always_ff @(posedge clk) begin
    wcol_d[0]  <= wr_color;
    half_d[0]  <= hcount[0];
    sel_d[0]   <= rd_sel;
    blank_d[0] <= blank;
    for (int i = 1; i < ZBT_LAT; i++) begin
      wcol_d[i]  <= wcol_d[i-1];
      half_d[i]  <= half_d[i-1];
      sel_d[i]   <= sel_d[i-1];
      blank_d[i] <= blank_d[i-1];
    end
  end

  always_comb begin
    for (int m = 0; m < 2; m++) zbt_wdata[m] = {wcol_d[ZBT_LAT-1], wcol_d[ZBT_LAT-1]};
  end

  logic [35:0] rword;
  assign rword = zbt_rdata[sel_d[ZBT_LAT-1]];

  always_ff @(posedge clk) begin
    rd_color  <= half_d[ZBT_LAT-1] ? rword[17:0] : rword[35:18];
    blank_out <= blank_d[ZBT_LAT-1];
  end

  // Frame completion: count written pixels, swap after the last one.
  always_ff @(posedge clk) begin
    if (rst) begin
      wr_count   <= '0;
      rd_sel     <= 1'b0;
      frame_swap <= 1'b0;
    end else begin
      frame_swap <= 1'b0;
      if (wr_valid) begin
        if (32'(wr_count) == NPIX - 1) begin
          wr_count   <= '0;
          rd_sel     <= ~rd_sel;
          frame_swap <= 1'b1;
        end else begin
          wr_count <= wr_count + 1'b1;
        end
      end
    end
  end

endmodule
