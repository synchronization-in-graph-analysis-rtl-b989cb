// tb_td_core_barrier: self-checking test of the per-core barrier unit.
// THREADS = 4. Random calls (only from threads not blocked), random votes,
// random message availability and occasional releases with a random vote.
// A reference model of the blocking call predicts, for every thread and
// cycle, whether the call returns and with which value (0 for a message,
// 1 or 2 for a release), plus all_in_barrier and all_vote. It also counts
// that every kind of return happened.
module tb_td_core_barrier;
  localparam int unsigned T = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [T-1:0] call = '0, vote = '0, msg_avail = '0;
  logic release_i = 1'b0, release_vote = 1'b0;
  logic [T-1:0] ret_valid;
  logic [T-1:0][1:0] ret_val;
  logic [T-1:0] in_barrier;
  logic all_in_barrier, all_vote;
  int checks = 0, failures = 0;
  int n_ret [3] = '{0, 0, 0};
  int n_all = 0;

  always #5 clk = ~clk;

  td_core_barrier #(.THREADS(T)) dut (.*);

  // reference state
  logic [T-1:0] m_blk = '0, m_vote = '0;
  logic [T-1:0] e_valid = '0;
  logic [T-1:0][1:0] e_val;

  always @(posedge clk) if (rst_n) begin
    // compare outputs with the model's predictions for this cycle
    for (int t = 0; t < int'(T); t++) begin
      checks++;
      if (ret_valid[t] != e_valid[t] || (e_valid[t] && ret_val[t] != e_val[t])) begin
        failures++;
        if (failures < 10) $display("FAIL: thread %0d ret %0b/%0d expected %0b/%0d", t, ret_valid[t], ret_val[t], e_valid[t], e_val[t]);
      end
      if (ret_valid[t] && e_valid[t]) n_ret[ret_val[t]]++;
    end
    checks++;
    if (all_in_barrier != (&m_blk) || (all_in_barrier && all_vote != (&m_vote)) || in_barrier != m_blk) begin
      failures++;
      if (failures < 10) $display("FAIL: all_in_barrier %0b all_vote %0b", all_in_barrier, all_vote);
    end
    if (all_in_barrier) n_all++;
    // advance the model with the inputs of this cycle
    for (int t = 0; t < int'(T); t++) begin
      e_valid[t] = 1'b0;
      if (m_blk[t]) begin
        if (msg_avail[t]) begin
          m_blk[t] = 1'b0; e_valid[t] = 1'b1; e_val[t] = 2'd0;
        end else if (release_i) begin
          m_blk[t] = 1'b0; e_valid[t] = 1'b1; e_val[t] = release_vote ? 2'd2 : 2'd1;
        end
      end else if (call[t]) begin
        m_blk[t] = 1'b1; m_vote[t] = vote[t];
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int t = 0; t < int'(T); t++) begin
        call[t]      = !in_barrier[t] && ($urandom % 3 == 0);
        vote[t]      = ($urandom % 8) != 0;
        msg_avail[t] = ($urandom % 40) == 0;
      end
      // releases mostly when all threads are blocked, as in the system
      release_i    = all_in_barrier ? ($urandom % 4 == 0) : ($urandom % 200 == 0);
      release_vote = ($urandom % 2) == 0;
    end
    @(negedge clk);
    call = '0; msg_avail = '0; release_i = 1'b0;
    repeat (3) @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_ret[k] == 0) begin
        failures++;
        $display("FAIL: return value %0d never seen", k);
      end
    end
    checks++;
    if (n_all == 0) begin failures++; $display("FAIL: all_in_barrier never high"); end
    $display("returns: msg=%0d release=%0d release_all_true=%0d, all_in_barrier cycles=%0d", n_ret[0], n_ret[1], n_ret[2], n_all);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
