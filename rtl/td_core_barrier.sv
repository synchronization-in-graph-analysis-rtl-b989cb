// td_core_barrier: barrier-call state of the THREADS hardware threads of one
// core.
//
// A thread enters the blocking barrier call with a one-cycle pulse on
// call[t], giving its vote on vote[t]. While it is blocked, the call returns
// (ret_valid[t] pulses) as soon as either
//   - a message is available for the thread (msg_avail[t]): return value 0, or
//   - the FPGA releases all calls after global termination (release):
//     return value 2 if every caller voted true (release_vote), otherwise 1.
// A message wins over a release in the same cycle. A call made while a
// message is already waiting returns 0 one cycle later. The return pulse
// comes one cycle after the event that caused it.
//
// all_in_barrier is high while every thread of the core is blocked in the
// call; it is the per-core wire the FPGA's conjunction tree reduces.
// all_vote is the AND of the blocked threads' votes, reduced the same way.
//
// The release conditions and the meaning of return values 0, non-zero and
// greater than one follow the design; the exact codes 1 and 2, the pulse
// interface and the priority of a message over a release are this
// design's choices.
module td_core_barrier #(
  parameter int unsigned THREADS = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [THREADS-1:0]      call,
  input  logic [THREADS-1:0]      vote,
  input  logic [THREADS-1:0]      msg_avail,
  input  logic                    release_i,
  input  logic                    release_vote,
  output logic [THREADS-1:0]      ret_valid,
  output logic [THREADS-1:0][1:0] ret_val,
  output logic [THREADS-1:0]      in_barrier,
  output logic                    all_in_barrier,
  output logic                    all_vote
);
  logic [THREADS-1:0] blocked, vote_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blocked   <= '0;
      vote_q    <= '0;
      ret_valid <= '0;
      ret_val   <= '0;
    end else begin
      for (int t = 0; t < int'(THREADS); t++) begin
        ret_valid[t] <= 1'b0;
        if (blocked[t]) begin
          if (msg_avail[t]) begin
            blocked[t]   <= 1'b0;
            ret_valid[t] <= 1'b1;
            ret_val[t]   <= 2'd0;
          end else if (release_i) begin
            blocked[t]   <= 1'b0;
            ret_valid[t] <= 1'b1;
            ret_val[t]   <= release_vote ? 2'd2 : 2'd1;
          end
        end else if (call[t]) begin
          blocked[t] <= 1'b1;
          vote_q[t]  <= vote[t];
        end
      end
    end
  end

  assign in_barrier     = blocked;
  assign all_in_barrier = &blocked;
  assign all_vote       = &(vote_q | ~blocked);

  // A thread cannot call the barrier while it is already blocked in it.
  a_no_double_call: assert property (@(posedge clk) disable iff (!rst_n)
    (call & blocked) == '0);
endmodule
