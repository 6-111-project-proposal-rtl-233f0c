// rt_output_seq: ray tracer output sequencer. The memory takes one write per
// cycle, but several ray tracer units may finish at once, so this block
// keeps one result register per unit and drains them one at a time.
//
// How it works. Each unit owns a 40-bit slot: the 39-bit result (colour, hit
// bit, x, y) and a valid bit. A unit with done high is acknowledged, and its
// result copied into its slot, whenever that slot is empty. Every cycle a
// scan pointer looks at the slots starting from where it last stopped and
// takes the first valid one it meets; that result goes out in the next
// cycle with out_valid, its slot is freed, and the pointer moves to the slot
// after it, so no unit is starved. One result leaves per cycle at most.
//
// Interface and timing. done/res/ack follow rt_unit: ack is combinational
// (done and slot empty) and the unit drops done in the next cycle. A result
// takes at least two cycles from done to out_valid (one into the slot, one
// through the output register). There is no back-pressure from downstream:
// the frame buffer accepts a write every cycle.
//
// The per-unit 40-bit buffer, the cycling scan and the one-output-per-cycle
// rate follow the project description. The slots are flip-flops rather than
// block RAM, since each is read and written independently every cycle; the
// round-robin pointer that resumes after the last slot served is this
// design's reading of "cycle through its registers".
module rt_output_seq
  import rt_pkg::*;
#(
  parameter int N_UNITS = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_UNITS-1:0] done,
  input  result_t            res [N_UNITS],
  output logic [N_UNITS-1:0] ack,
  output logic               out_valid,
  output result_t            out_res,
  output logic [N_UNITS-1:0] occupancy    // slot valid bits, for observation
);

  localparam int PW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;

  logic [N_UNITS-1:0] slot_valid;
  result_t            slot [N_UNITS];
  logic [PW-1:0]      ptr;

  // First valid slot at or after ptr, wrapping around.
  logic          found;
  logic [PW-1:0] sel;
  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int k = 0; k < N_UNITS; k++) begin
      if (!found && slot_valid[(int'(ptr) + k) % N_UNITS]) begin
        found = 1'b1;
        sel   = PW'((int'(ptr) + k) % N_UNITS);
      end
    end
  end

  assign ack       = done & ~slot_valid;
  assign occupancy = slot_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot_valid <= '0;
      ptr        <= '0;
      out_valid  <= 1'b0;
      out_res    <= '0;
    end else begin
      out_valid <= found;
      if (found) begin
        out_res <= slot[sel];
        ptr     <= (32'(sel) == N_UNITS - 1) ? '0 : sel + 1'b1;
      end
      for (int i = 0; i < N_UNITS; i++) begin
        if (ack[i]) begin
          slot[i]       <= res[i];
          slot_valid[i] <= 1'b1;
        end else if (found && 32'(sel) == i) begin
          slot_valid[i] <= 1'b0;
        end
      end
    end
  end

endmodule
