// tb_td_fpga: directed, self-checking test of one FPGA's termination
// hardware (CORES = 4, THREADS = 2, so the trees are DEPTH = 2 deep).
// Scenarios:
//   1. all threads block (voting true); a token is answered white with
//      count 0 and vote 1;
//   2. a thread is woken by a message (return 0), the core receives it and
//      two sends happen; the thread blocks again voting false; the token
//      reply carries count +1, black, vote 0; the next one is white;
//   3. a token arrives while a thread is active; the reply comes exactly
//      DEPTH + 2 cycles after that thread's barrier call;
//   4. TERMINATE with vote 1 releases every thread with return value 2,
//      drops send_en and is acknowledged; REENABLE raises send_en and is
//      acknowledged; a second release with vote 0 returns 1.
module tb_td_fpga;
  import td_pkg::*;
  localparam int unsigned C = 4, T = 2, DEPTH = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [C-1:0] send_pulse = '0, recv_pulse = '0;
  logic [C-1:0][T-1:0] bar_call = '0, bar_vote = '0, msg_avail = '0;
  logic [C-1:0][T-1:0] ret_valid, in_barrier;
  logic [C-1:0][T-1:0][1:0] ret_val;
  logic send_en;
  td_req_t req_i = '0;
  td_rsp_t rsp_o;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  td_fpga #(.CORES(C), .THREADS(T)) dut (.*);

  // capture replies and returns
  td_rsp_t last_rsp;
  int      last_rsp_cycle = -1, n_rsp = 0;
  int      n_ret [3] = '{0, 0, 0};
  always @(posedge clk) if (rst_n) begin
    if (rsp_o.valid) begin last_rsp <= rsp_o; last_rsp_cycle <= cycle; n_rsp <= n_rsp + 1; end
    for (int c = 0; c < int'(C); c++)
      for (int t = 0; t < int'(T); t++)
        if (ret_valid[c][t]) n_ret[ret_val[c][t]]++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  task automatic request(req_kind_e k, bit v);
    @(negedge clk);
    req_i = '{valid: 1'b1, kind: k, vote: v};
    @(negedge clk);
    req_i = '0;
  endtask

  task automatic wait_rsp(int n_before);
    int guard = 0;
    while (n_rsp == n_before && guard < 100) begin @(negedge clk); guard++; end
    check(n_rsp == n_before + 1, "reply missing");
  endtask

  task automatic call_all(bit v);
    @(negedge clk);
    for (int c = 0; c < int'(C); c++)
      for (int t = 0; t < int'(T); t++)
        if (!in_barrier[c][t]) begin bar_call[c][t] = 1'b1; bar_vote[c][t] = v; end
    @(negedge clk);
    bar_call = '0;
  endtask

  initial begin
    int n0, k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // 1. everyone blocks, token answered clean
    call_all(1'b1);
    repeat (DEPTH + 2) @(negedge clk);
    n0 = n_rsp;
    request(REQ_TOKEN, 1'b0);
    wait_rsp(n0);
    check(last_rsp.kind == RSP_TOKEN && last_rsp.count == 0 && !last_rsp.black && last_rsp.vote,
          $sformatf("clean token: kind %0d count %0d black %0b vote %0b", last_rsp.kind, last_rsp.count, last_rsp.black, last_rsp.vote));

    // 2. wake thread (1,0) by a message, receive it, send two messages
    @(negedge clk); msg_avail[1][0] = 1'b1;
    @(negedge clk); msg_avail[1][0] = 1'b0;
    @(negedge clk);
    check(n_ret[0] == 1 && !in_barrier[1][0], "message wake-up returned 0");
    recv_pulse[1] = 1'b1;
    @(negedge clk); recv_pulse[1] = 1'b0; send_pulse[1] = 1'b1;
    @(negedge clk); send_pulse[1] = 1'b1;
    @(negedge clk); send_pulse[1] = 1'b0;
    bar_call[1][0] = 1'b1; bar_vote[1][0] = 1'b0;
    @(negedge clk); bar_call = '0;
    repeat (DEPTH + 2) @(negedge clk);
    n0 = n_rsp;
    request(REQ_TOKEN, 1'b0);
    wait_rsp(n0);
    check(last_rsp.count == 1 && last_rsp.black && !last_rsp.vote,
          $sformatf("after traffic: count %0d black %0b vote %0b", last_rsp.count, last_rsp.black, last_rsp.vote));
    n0 = n_rsp;
    request(REQ_TOKEN, 1'b0);
    wait_rsp(n0);
    check(last_rsp.count == 1 && !last_rsp.black, "whitened after forwarding");

    // 3. token held while a thread is active
    @(negedge clk); msg_avail[2][1] = 1'b1;
    @(negedge clk); msg_avail[2][1] = 1'b0;
    recv_pulse[2] = 1'b1;
    @(negedge clk); recv_pulse[2] = 1'b0;
    n0 = n_rsp;
    request(REQ_TOKEN, 1'b0);
    repeat (10) @(negedge clk);
    check(n_rsp == n0, "token must be held while a thread is active");
    bar_call[2][1] = 1'b1; bar_vote[2][1] = 1'b1;
    k = cycle;
    @(negedge clk); bar_call = '0;
    wait_rsp(n0);
    check(last_rsp_cycle == k + int'(DEPTH) + 2, $sformatf("held token replied at %0d, expected %0d", last_rsp_cycle, k + DEPTH + 2));
    check(last_rsp.count == 0 && last_rsp.black, "count back to 0, black after receive");

    // 4. release with vote 1, then re-enable; then release with vote 0
    check(send_en, "sending enabled before release");
    n0 = n_rsp;
    request(REQ_TERMINATE, 1'b1);
    wait_rsp(n0);
    @(negedge clk);
    check(last_rsp.kind == RSP_ACK, "release acknowledged");
    check(!send_en, "sending disabled after release");
    check(n_ret[2] == int'(C * T), $sformatf("%0d threads returned 2", n_ret[2]));
    check(in_barrier == '0, "all threads released");
    n0 = n_rsp;
    request(REQ_REENABLE, 1'b0);
    wait_rsp(n0);
    @(negedge clk);
    check(last_rsp.kind == RSP_ACK && send_en, "re-enable acknowledged, sending enabled");
    call_all(1'b0);
    repeat (DEPTH + 2) @(negedge clk);
    n0 = n_rsp;
    request(REQ_TERMINATE, 1'b0);
    wait_rsp(n0);
    @(negedge clk);
    check(n_ret[1] == int'(C * T), $sformatf("%0d threads returned 1", n_ret[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
