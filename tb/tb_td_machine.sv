// tb_td_machine: self-checking test of the per-FPGA Safra machine.
// Drives the machine's tree inputs (net count, passive, vote, receive) with
// random values and sends master requests one at a time, as the master
// would. A reference model written from Safra's rules predicts every reply:
//   - a token reply only once passive is seen, the cycle after;
//   - its count is the sum of all net counts up to and including the
//     passive cycle;
//   - its colour is black if any receive was seen since the previous token
//     reply (including the passive cycle), and the machine whitens after;
//   - TERMINATE pulses release with the given vote, drops send_en and is
//     acknowledged; REENABLE raises send_en and is acknowledged.
// Coverage counters make sure held tokens, black and white replies, and
// both release votes all occur.
module tb_td_machine;
  import td_pkg::*;
  localparam int unsigned SUM_W = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [SUM_W-1:0] net_count = '0;
  logic passive = 1'b0, vote_all = 1'b0, recv_any = 1'b0;
  td_req_t req_i = '0;
  td_rsp_t rsp_o;
  logic release_o, release_vote, send_en;
  int checks = 0, failures = 0;
  int n_held = 0, n_black = 0, n_white = 0, n_rel [2] = '{0, 0}, n_reen = 0;

  always #5 clk = ~clk;

  td_machine #(.SUM_W(SUM_W)) dut (.*);

  // model
  longint m_count = 0;
  bit m_black = 0, m_held = 0, m_send_en = 1;
  int m_wait = 0;
  // expected outputs for the next cycle
  bit e_valid = 0, e_release = 0, e_rvote = 0;
  rsp_kind_e e_kind;
  bit e_black, e_vote;
  longint e_count;
  bit outstanding = 0;  // tb-side: a request is waiting for its reply

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (rsp_o.valid != e_valid ||
        (e_valid && (rsp_o.kind != e_kind ||
          (e_kind == RSP_TOKEN && (rsp_o.black != e_black || rsp_o.vote != e_vote ||
                                   longint'(rsp_o.count) != e_count))))) begin
      failures++;
      if (failures < 10) $display("FAIL: rsp v%0b k%0d b%0b vt%0b c%0d expected v%0b k%0d b%0b vt%0b c%0d",
        rsp_o.valid, rsp_o.kind, rsp_o.black, rsp_o.vote, rsp_o.count, e_valid, e_kind, e_black, e_vote, e_count);
    end
    checks++;
    if (release_o != e_release || (e_release && release_vote != e_rvote) || send_en != m_send_en) begin
      failures++;
      if (failures < 10) $display("FAIL: release %0b/%0b send_en %0b expected %0b/%0b %0b", release_o, release_vote, send_en, e_release, e_rvote, m_send_en);
    end
    if (rsp_o.valid) outstanding = 0;
    // model step with this cycle's inputs
    e_valid = 0; e_release = 0;
    m_count += longint'(net_count);
    if (m_held && passive) begin
      e_valid = 1; e_kind = RSP_TOKEN; e_black = m_black | recv_any; e_vote = vote_all; e_count = m_count;
      if (e_black) n_black++; else n_white++;
      if (m_wait > 0) n_held++;
      m_held = 0; m_black = 0;
    end else begin
      if (recv_any) m_black = 1;
      if (m_held) m_wait++;
    end
    if (req_i.valid) begin
      case (req_i.kind)
        REQ_TOKEN: begin m_held = 1; m_wait = 0; end
        REQ_TERMINATE: begin
          e_release = 1; e_rvote = req_i.vote; m_send_en = 0; e_valid = 1; e_kind = RSP_ACK;
          n_rel[req_i.vote]++;
        end
        default: begin m_send_en = 1; e_valid = 1; e_kind = RSP_ACK; n_reen++; end
      endcase
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      net_count = SUM_W'($signed(int'($urandom % 7) - 3));
      passive   = ($urandom % 6) == 0;
      vote_all  = ($urandom % 2) == 0;
      recv_any  = ($urandom % 5) == 0;
      req_i     = '0;
      if (!outstanding && ($urandom % 3 == 0)) begin
        automatic int k = $urandom % 4;
        req_i.valid = 1'b1;
        req_i.kind  = (k < 2) ? REQ_TOKEN : (k == 2) ? REQ_TERMINATE : REQ_REENABLE;
        req_i.vote  = 1'($urandom % 2);
        outstanding = 1;
      end
    end
    @(negedge clk);
    req_i = '0;
    repeat (3) @(negedge clk);
    checks += 5;
    if (n_held == 0)  begin failures++; $display("FAIL: no token was held"); end
    if (n_black == 0) begin failures++; $display("FAIL: no black reply"); end
    if (n_white == 0) begin failures++; $display("FAIL: no white reply"); end
    if (n_rel[0] == 0 || n_rel[1] == 0) begin failures++; $display("FAIL: release votes not both seen"); end
    if (n_reen == 0)  begin failures++; $display("FAIL: no re-enable"); end
    $display("held=%0d black=%0d white=%0d release(vote0)=%0d release(vote1)=%0d reenable=%0d",
             n_held, n_black, n_white, n_rel[0], n_rel[1], n_reen);
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
