// tb_control_unit -- checks the round sequencer of the basic iterative units with
// ROUNDS = 5 against a cycle-by-cycle model: a start while ready loads a block, rounds
// 1..5 follow in consecutive cycles, `last` marks round 5, a stall holds the last round,
// a start during rounds 1..4 is ignored and a start in an unstalled last round chains the
// next block without a gap.
module tb_control_unit;
  localparam int ROUNDS = 5;

  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0, stall = 1'b0;
  logic       ready, busy, last, done;
  logic [2:0] round;
  int         checks = 0, failures = 0;
  int         m_round = 0;           // model: 0 idle, else current round
  int         n_chain = 0, n_stall = 0, n_done = 0;

  always #5 clk = ~clk;

  control_unit #(.ROUNDS(ROUNDS)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (model round %0d)", what, m_round); end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      bit m_last, m_done, m_ready;
      m_last  = (m_round == ROUNDS);
      m_done  = m_last && !stall;
      m_ready = (m_round == 0) || m_done;
      chk(busy == (m_round != 0), "busy");
      chk(int'(round) == m_round, $sformatf("round %0d", round));
      chk(last == m_last, "last");
      chk(done == m_done, "done");
      chk(ready == m_ready, "ready");
      if (m_done) n_done++;
      if (m_last && stall) n_stall++;
      if (m_ready && start) begin
        if (m_done) n_chain++;
        m_round <= 1;
      end else if (m_done) m_round <= 0;
      else if (m_round != 0 && !m_last) m_round <= m_round + 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (600) begin
      @(negedge clk);
      start = ($urandom_range(0, 2) == 0);
      stall = ($urandom_range(0, 3) == 0);
    end
    chk(n_chain > 0 && n_stall > 0 && n_done > 20, "chained loads, stalls and completions seen");
    $display("done=%0d chained=%0d stalled=%0d", n_done, n_chain, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
