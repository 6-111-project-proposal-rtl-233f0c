// zbt_model: behavioural model of one pipelined ZBT SRAM of the kind on the
// board (512K x 36, four 9-bit byte-write lanes). An address and its write
// enable are taken at a clock edge; write data is taken two edges later,
// and read data for the address is driven after the next edge, ready to be
// sampled two edges after the address. It is a simulation model only.
module zbt_model #(
  parameter int AW = 19
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [3:0]    bwe,
  input  logic [35:0]   wdata,
  output logic [35:0]   rdata
);

  logic [35:0]   mem [2**AW];
  logic [AW-1:0] a1, a2;
  logic          w1, w2;
  logic [3:0]    b1, b2;

  always_ff @(posedge clk) begin
    a1 <= addr; w1 <= we; b1 <= bwe;
    a2 <= a1;   w2 <= w1; b2 <= b1;
    rdata <= mem[a1];
    if (w2)
      for (int l = 0; l < 4; l++)
        if (b2[l]) mem[a2][9*l +: 9] <= wdata[9*l +: 9];
  end

endmodule
