// tb_rt_output_seq: self-checking test of the output sequencer with four
// model units. Each model unit presents a random result with done after a
// random pause and holds it until ack. A reference model of the slots and
// the scan pointer predicts which result leaves in every cycle; the test
// also checks that every result leaves exactly once and that several slots
// are sometimes full at once.
module tb_rt_output_seq;
  import rt_pkg::*;

  localparam int NU = 4;

  logic          clk = 0, rst = 1;
  logic [NU-1:0] done, ack, occupancy;
  result_t       res [NU];
  logic          out_valid;
  result_t       out_res;

  rt_output_seq #(.N_UNITS(NU)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model units: pause, then present a result until acknowledged
  int pause [NU];
  int sent = 0, received = 0;
  always_ff @(posedge clk) begin
    for (int i = 0; i < NU; i++) begin
      if (rst) begin
        done[i] <= 1'b0;
        pause[i] <= i;
      end else if (done[i]) begin
        if (ack[i]) begin
          done[i]  <= 1'b0;
          pause[i] <= ($urandom % 4 == 0) ? int'($urandom % 6) : 0;
        end
      end else if (pause[i] != 0) pause[i] <= pause[i] - 1;
      else begin
        done[i] <= 1'b1;
        res[i]  <= result_t'({$urandom, $urandom});
        sent    <= sent + 1;
      end
    end
  end

  // reference slots
  logic    m_valid [NU];
  result_t m_slot  [NU];
  int      m_ptr;
  logic    exp_valid;
  result_t exp_res;
  int      multi = 0;

  always @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NU; i++) m_valid[i] = 0;
      m_ptr = 0;
      exp_valid = 0;
    end else begin
      int cnt, sel;
      // check the output produced by the previous cycle's choice
      #1;
      checks++;
      if (out_valid !== exp_valid || (exp_valid && out_res !== exp_res)) begin
        failures++;
        $display("out_valid=%0d res=%h, expected %0d %h", out_valid, out_res, exp_valid, exp_res);
      end
      if (out_valid) received++;
    end
  end

  // compute the expectation for the next edge from the state before it
  always @(negedge clk) begin
    if (!rst) begin
      int cnt, sel;
      cnt = 0; sel = -1;
      for (int i = 0; i < NU; i++) if (m_valid[i]) cnt++;
      if (cnt > 1) multi++;
      for (int k = 0; k < NU; k++)
        if (sel < 0 && m_valid[(m_ptr + k) % NU]) sel = (m_ptr + k) % NU;
      checks++;
      for (int i = 0; i < NU; i++)
        if (ack[i] !== (done[i] && !m_valid[i])) begin failures++; $display("ack[%0d] wrong", i); end
      exp_valid = (sel >= 0);
      if (sel >= 0) begin
        exp_res = m_slot[sel];
        m_valid[sel] = 0;
        m_ptr = (sel + 1) % NU;
      end
      for (int i = 0; i < NU; i++)
        if (done[i] && ack[i]) begin m_valid[i] = 1; m_slot[i] = res[i]; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    repeat (5000) @(posedge clk);
    @(negedge clk);
    checks++;
    if (multi == 0) begin failures++; $display("slots never contended"); end
    checks++;
    if (received < 1000) begin failures++; $display("only %0d results", received); end
    $display("results=%0d contended cycles=%0d", received, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
