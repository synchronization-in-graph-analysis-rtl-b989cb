// td_master: the single Safra master of the cluster, placed on a bridge
// board, talking to N_MACH worker FPGAs in a star.
//
// Phase 1 (detection): the master sends a token request to every FPGA at
// once and collects one reply from each. It sums the returned counts, ORs
// their colours and ANDs their votes. Termination is detected when the sum
// is zero and every reply is white (Safra rules 4 and 6); otherwise a new
// round starts at once.
// Phase 2 (release): "termination detected", with the combined vote, is sent
// to every FPGA; each releases its barrier calls, stops sending and
// acknowledges.
// Phase 3 (re-enable): once all phase-2 acknowledgements are in, "re-enable
// sending" is sent to every FPGA; when all have acknowledged, the next token
// round starts.
//
// Requests are one-cycle pulses broadcast on req_o (the same value for every
// FPGA); replies may arrive in any order and several in one cycle. One round
// costs two link traversals plus the time the slowest FPGA holds its token.
// enable low holds the master idle between rounds.
//
// The star topology, the colour/count test and the three phases follow the
// design. Starting a new round straight after a refuted round or after
// phase 3, carrying the vote in the phase-2 request and the status counters
// are this design's choices.
module td_master
  import td_pkg::*;
#(
  parameter int unsigned N_MACH = 48
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 enable,
  output td_req_t [N_MACH-1:0] req_o,
  input  td_rsp_t [N_MACH-1:0] rsp_i,
  output logic                 detect_o,  // pulse: termination detected
  output td_status_t           status
);
  localparam int unsigned CNT_W = $clog2(N_MACH + 1);

  master_state_e             state;
  logic [CNT_W-1:0]          replies;
  logic signed [COUNT_W-1:0] acc;
  logic                      acc_black;
  logic                      acc_vote;

  // Combine the replies arriving in this cycle.
  logic [CNT_W-1:0]          n_now;
  logic signed [COUNT_W-1:0] sum_now;
  logic                      black_now, vote_now;

  always_comb begin
    n_now     = '0;
    sum_now   = '0;
    black_now = 1'b0;
    vote_now  = 1'b1;
    for (int m = 0; m < int'(N_MACH); m++) begin
      if (rsp_i[m].valid) begin
        n_now   = n_now + 1'b1;
        if (rsp_i[m].kind == RSP_TOKEN) begin
          sum_now   = sum_now + rsp_i[m].count;
          black_now = black_now | rsp_i[m].black;
          vote_now  = vote_now & rsp_i[m].vote;
        end
      end
    end
  end

  logic [CNT_W-1:0]          replies_next;
  logic signed [COUNT_W-1:0] acc_next;
  logic                      black_next, vote_next, all_in;

  assign replies_next = replies + n_now;
  assign acc_next     = acc + sum_now;
  assign black_next   = acc_black | black_now;
  assign vote_next    = acc_vote & vote_now;
  assign all_in       = (replies_next == CNT_W'(N_MACH));

  td_req_t req_q;
  assign req_o = {N_MACH{req_q}};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      replies   <= '0;
      acc       <= '0;
      acc_black <= 1'b0;
      acc_vote  <= 1'b1;
      req_q     <= '0;
      detect_o  <= 1'b0;
      status    <= '0;
    end else begin
      req_q        <= '0;
      detect_o     <= 1'b0;
      status.state <= state;
      unique case (state)
        M_IDLE: if (enable) state <= M_TOKEN_SEND;
        M_TOKEN_SEND: begin
          req_q     <= '{valid: 1'b1, kind: REQ_TOKEN, vote: 1'b0};
          replies   <= '0;
          acc       <= '0;
          acc_black <= 1'b0;
          acc_vote  <= 1'b1;
          state     <= M_TOKEN_WAIT;
        end
        M_TOKEN_WAIT: begin
          replies   <= replies_next;
          acc       <= acc_next;
          acc_black <= black_next;
          acc_vote  <= vote_next;
          if (all_in) begin
            status.rounds <= status.rounds + 1;
            if (acc_next == '0 && !black_next) begin
              detect_o         <= 1'b1;
              status.detections <= status.detections + 1;
              status.last_vote <= vote_next;
              state            <= M_TERM_SEND;
            end else begin
              if (black_next) status.refuted_black <= status.refuted_black + 1;
              else            status.refuted_count <= status.refuted_count + 1;
              state <= enable ? M_TOKEN_SEND : M_IDLE;
            end
          end
        end
        M_TERM_SEND: begin
          req_q   <= '{valid: 1'b1, kind: REQ_TERMINATE, vote: acc_vote};
          replies <= '0;
          state   <= M_TERM_WAIT;
        end
        M_TERM_WAIT: begin
          replies <= replies_next;
          if (all_in) state <= M_REEN_SEND;
        end
        M_REEN_SEND: begin
          req_q   <= '{valid: 1'b1, kind: REQ_REENABLE, vote: 1'b0};
          replies <= '0;
          state   <= M_REEN_WAIT;
        end
        M_REEN_WAIT: begin
          replies <= replies_next;
          if (all_in) state <= enable ? M_TOKEN_SEND : M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // Replies only come while the master waits for them.
  a_rsp_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
    (n_now != '0) |-> (state inside {M_TOKEN_WAIT, M_TERM_WAIT, M_REEN_WAIT}));
endmodule
