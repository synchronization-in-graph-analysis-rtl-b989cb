// tb_td_master: self-checking test of the Safra master with N_MACH = 3
// FPGAs replaced by simple responders. Each responder answers a token after
// a random delay with a count, colour and vote chosen by the testbench so
// that rounds end in all three ways: refuted by a black token, refuted by a
// non-zero sum, or termination. The test predicts each round's outcome from
// the replies it generated and checks:
//   - a request is broadcast to all FPGAs, only after all replies of the
//     previous phase are in;
//   - after a refuted round the next request is again a token;
//   - after a detection: a detect pulse, then TERMINATE carrying the AND of
//     the votes, then REENABLE only once every TERMINATE was acknowledged,
//     then a new token round once every REENABLE was acknowledged;
//   - the status counters match the rounds seen.
module tb_td_master;
  import td_pkg::*;
  localparam int unsigned N = 3;

  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0;
  td_req_t [N-1:0] req_o;
  td_rsp_t [N-1:0] rsp_i = '0;
  logic detect_o;
  td_status_t status;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  td_master #(.N_MACH(N)) dut (.*);

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // Responders: pending reply per FPGA, with due cycle.
  int due [N];
  td_rsp_t pend [N];
  bit busy [N];

  // Outcome bookkeeping
  int exp_kind = 0;           // 0 expect TOKEN, 1 expect TERMINATE, 2 expect REENABLE
  bit exp_vote;
  bit exp_detect = 0;
  int replies_left = 0;
  int n_rounds = 0, n_black = 0, n_count = 0, n_det = 0, n_det_vote = 0;
  int round_sum; bit round_black, round_vote;
  req_kind_e last_req = REQ_TOKEN;
  always @(posedge clk) if (req_o[0].valid) last_req <= req_o[0].kind;

  always @(posedge clk) if (rst_n) begin
    // deliver replies that are due (several may land in one cycle)
    for (int m = 0; m < int'(N); m++) begin
      rsp_i[m] <= '0;
      if (busy[m] && cycle >= due[m]) begin
        rsp_i[m] <= pend[m];
        busy[m] = 0;
      end
    end
    // check detect pulse timing: one cycle after the last token reply
    if (detect_o) begin
      checks++;
      if (!exp_detect) fail("unexpected detect");
      exp_detect = 0;
    end
    // requests from the master
    if (req_o[0].valid) begin
      checks++;
      for (int m = 1; m < int'(N); m++) if (req_o[m] != req_o[0]) fail("request not broadcast");
      if (replies_left != 0) fail("request before all replies");
      if (exp_detect) fail("detect pulse missing");
      if (int'(req_o[0].kind) != exp_kind) fail($sformatf("request kind %0d expected %0d", req_o[0].kind, exp_kind));
      if (req_o[0].kind == REQ_TERMINATE && req_o[0].vote != exp_vote) fail("wrong vote in TERMINATE");
      replies_left = N;
      round_sum = 0; round_black = 0; round_vote = 1;
      for (int m = 0; m < int'(N); m++) begin
        busy[m] = 1;
        due[m]  = cycle + 1 + ($urandom % 12);
        pend[m] = '0;
        pend[m].valid = 1'b1;
        if (req_o[0].kind == REQ_TOKEN) begin
          automatic int mode = $urandom % 3;   // 0: clean, 1: black, 2: count off
          pend[m].kind  = RSP_TOKEN;
          pend[m].vote  = ($urandom % 4) != 0;
          pend[m].black = (mode == 1) && ($urandom % 2 == 0);
          pend[m].count = COUNT_W'($signed(int'($urandom % 5) - 2));
          if (mode == 0 && m == N - 1) pend[m].count = COUNT_W'(-round_sum);
          round_sum   += int'(pend[m].count);
          round_black |= pend[m].black;
          round_vote  &= pend[m].vote;
        end else begin
          pend[m].kind = RSP_ACK;
        end
      end
      exp_kind = -1;  // nothing may be requested until replies are in
      if (req_o[0].kind == REQ_TOKEN) begin
        // decide the expected next step once replies are in (below)
        exp_vote = round_vote;
      end
    end
    // count replies seen by the master
    for (int m = 0; m < int'(N); m++) if (rsp_i[m].valid) begin
      replies_left--;
      if (replies_left == 0) begin
        if (rsp_i[m].kind == RSP_TOKEN) begin
          n_rounds++;
          if (round_black) begin n_black++; exp_kind = 0; end
          else if (round_sum != 0) begin n_count++; exp_kind = 0; end
          else begin n_det++; if (round_vote) n_det_vote++; exp_kind = 1; exp_detect = 1; end
        end else begin
          exp_kind = (exp_kind == -1 && last_req == REQ_TERMINATE) ? 2 : 0;
        end
      end
    end
  end

  initial begin
    for (int m = 0; m < int'(N); m++) busy[m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    checks++;
    if (req_o[0].valid) fail("request while disabled");
    enable = 1'b1;
    repeat (8000) @(negedge clk);
    enable = 1'b0;
    repeat (60) @(negedge clk);
    checks++;
    if (status.rounds != n_rounds || status.refuted_black != n_black ||
        status.refuted_count != n_count || status.detections != n_det)
      fail($sformatf("status %0d/%0d/%0d/%0d expected %0d/%0d/%0d/%0d", status.rounds, status.refuted_black,
           status.refuted_count, status.detections, n_rounds, n_black, n_count, n_det));
    checks++;
    if (n_black == 0 || n_count == 0 || n_det == 0 || n_det_vote == 0 || n_det_vote == n_det)
      fail("not every outcome occurred");
    $display("rounds=%0d black=%0d nonzero=%0d detections=%0d (all-true votes %0d)", n_rounds, n_black, n_count, n_det, n_det_vote);
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
