// td_fpga: termination-detection hardware of one worker FPGA.
//
// Each of the CORES cores has a td_core_barrier holding the barrier state of
// its THREADS threads. Four reduction trees of identical depth
// (DEPTH = clog2(CORES)) turn the per-core wires into FPGA-wide values:
//   - td_count_tree: per-core send and receive pulses -> signed
//     sends-minus-receives per cycle,
//   - td_and_tree:   per-core "all threads in barrier" -> passive,
//   - td_and_tree:   per-core "all votes true" -> vote,
//   - td_and_tree on inverted receive pulses, output inverted -> "some core
//     received a message".
// Because all trees have the same depth, the td_machine sees the count and
// the passive state of one and the same earlier cycle, so a token is never
// returned with a count that does not match the sampled state. The machine
// talks to the master over req_i/rsp_o and broadcasts release and send_en
// back to the cores.
//
// Timing: a core event reaches the machine DEPTH cycles later; a release
// request reaches the threads' return ports two cycles after it arrives.
//
// The hierarchy (trees inside the FPGA, Safra between FPGAs) follows the
// design; the vote and receive trees are this design's additions for the
// vote and the colour, which the design requires but does not detail.
module td_fpga
  import td_pkg::*;
#(
  parameter int unsigned CORES   = 64,
  parameter int unsigned THREADS = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [CORES-1:0]                   send_pulse,
  input  logic [CORES-1:0]                   recv_pulse,
  input  logic [CORES-1:0][THREADS-1:0]      bar_call,
  input  logic [CORES-1:0][THREADS-1:0]      bar_vote,
  input  logic [CORES-1:0][THREADS-1:0]      msg_avail,
  output logic [CORES-1:0][THREADS-1:0]      ret_valid,
  output logic [CORES-1:0][THREADS-1:0][1:0] ret_val,
  output logic [CORES-1:0][THREADS-1:0]      in_barrier,
  output logic                               send_en,
  input  td_req_t                            req_i,
  output td_rsp_t                            rsp_o
);
  localparam int unsigned DEPTH = (CORES <= 1) ? 1 : $clog2(CORES);
  localparam int unsigned SUM_W = DEPTH + 2;

  logic [CORES-1:0]        core_passive, core_vote;
  logic                    release_s, release_vote;
  logic signed [SUM_W-1:0] net_count;
  logic                    passive, vote_all, no_recv;

  for (genvar c = 0; c < int'(CORES); c++) begin : g_core
    td_core_barrier #(.THREADS(THREADS)) u_bar (
      .clk, .rst_n,
      .call          (bar_call[c]),
      .vote          (bar_vote[c]),
      .msg_avail     (msg_avail[c]),
      .release_i     (release_s),
      .release_vote  (release_vote),
      .ret_valid     (ret_valid[c]),
      .ret_val       (ret_val[c]),
      .in_barrier    (in_barrier[c]),
      .all_in_barrier(core_passive[c]),
      .all_vote      (core_vote[c])
    );
  end

  td_count_tree #(.N(CORES), .DEPTH(DEPTH), .SUM_W(SUM_W)) u_count (
    .clk, .rst_n, .send(send_pulse), .recv(recv_pulse), .sum(net_count));

  td_and_tree #(.N(CORES), .DEPTH(DEPTH)) u_passive (
    .clk, .rst_n, .in(core_passive), .out(passive));

  td_and_tree #(.N(CORES), .DEPTH(DEPTH)) u_vote (
    .clk, .rst_n, .in(core_vote), .out(vote_all));

  td_and_tree #(.N(CORES), .DEPTH(DEPTH), .RST_VAL(1'b1)) u_recv (
    .clk, .rst_n, .in(~recv_pulse), .out(no_recv));

  td_machine #(.SUM_W(SUM_W)) u_machine (
    .clk, .rst_n,
    .net_count, .passive, .vote_all,
    .recv_any    (~no_recv),
    .req_i, .rsp_o,
    .release_o   (release_s),
    .release_vote,
    .send_en
  );
endmodule
