// td_machine: the Safra "machine" of one worker FPGA, plus its part in the
// barrier release.
//
// Inputs come from three reduction trees of equal depth, so in any cycle
// they describe the same earlier moment of all cores on the FPGA:
//   net_count  sends minus receives in that cycle (adder tree)
//   passive    every thread of every core is blocked in the barrier call
//   vote_all   every blocked thread voted true
//   recv_any   some core received a message in that cycle
// The machine keeps
//   count  the cumulative sends-minus-receives of the FPGA (Safra rule 1),
//          updated every cycle;
//   black  set by any receive (rule 5), cleared when a token is forwarded
//          (rule 7).
// Requests from the master (td_pkg::td_req_t):
//   REQ_TOKEN      the token is held until passive is seen (rule 3); then a
//                  reply carries count and colour including the current
//                  cycle's sample, plus the vote, and the machine whitens.
//                  Holding the token blocks nothing: messages keep flowing,
//                  and the reply simply waits for the next passive sample.
//   REQ_TERMINATE  pulse release (with the master's vote) to every core,
//                  disable sending, and acknowledge in the same cycle.
//   REQ_REENABLE   enable sending and acknowledge.
// Replies appear the cycle after the request (or after passive is seen for
// a held token) and are one-cycle valid pulses; the channel has no
// backpressure, and the master never has two requests outstanding.
//
// Rules 1, 3, 5 and 7, the star-shaped token return and the three-phase
// release follow the design. The separate receive-OR tree that blackens the
// machine, the acknowledgement timing and the reset values (white, count 0,
// sending enabled) are this design's choices.
module td_machine
  import td_pkg::*;
#(
  parameter int unsigned SUM_W = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [SUM_W-1:0] net_count,
  input  logic                    passive,
  input  logic                    vote_all,
  input  logic                    recv_any,
  input  td_req_t                 req_i,
  output td_rsp_t                 rsp_o,
  output logic                    release_o,
  output logic                    release_vote,
  output logic                    send_en
);
  logic signed [COUNT_W-1:0] count;
  logic signed [COUNT_W-1:0] count_now;
  logic                      black;
  logic                      token_held;
  logic                      forward;

  assign count_now = count + COUNT_W'(net_count);
  assign forward   = token_held && passive;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count        <= '0;
      black        <= 1'b0;
      token_held   <= 1'b0;
      send_en      <= 1'b1;
      release_o    <= 1'b0;
      release_vote <= 1'b0;
      rsp_o        <= '0;
    end else begin
      count     <= count_now;
      release_o <= 1'b0;
      rsp_o     <= '0;

      // Rule 5 / rule 7: a receive blackens, forwarding whitens; the receive
      // sampled in the forwarding cycle is reported in the reply itself.
      if (forward)       black <= 1'b0;
      else if (recv_any) black <= 1'b1;

      if (forward) begin
        token_held  <= 1'b0;
        rsp_o.valid <= 1'b1;
        rsp_o.kind  <= RSP_TOKEN;
        rsp_o.black <= black | recv_any;
        rsp_o.vote  <= vote_all;
        rsp_o.count <= count_now;
      end

      if (req_i.valid) begin
        unique case (req_i.kind)
          REQ_TOKEN: token_held <= 1'b1;
          REQ_TERMINATE: begin
            release_o    <= 1'b1;
            release_vote <= req_i.vote;
            send_en      <= 1'b0;
            rsp_o.valid  <= 1'b1;
            rsp_o.kind   <= RSP_ACK;
          end
          REQ_REENABLE: begin
            send_en     <= 1'b1;
            rsp_o.valid <= 1'b1;
            rsp_o.kind  <= RSP_ACK;
          end
          default: ;
        endcase
      end
    end
  end

  // Protocol: one request outstanding, so no request while a token is held
  // and none at all in the cycle a token is forwarded.
  a_one_outstanding: assert property (@(posedge clk) disable iff (!rst_n)
    req_i.valid |-> !token_held);
endmodule
