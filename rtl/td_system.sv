// td_system: hardware termination detection and refutable global barrier for
// a cluster of N_FPGA worker FPGAs, each with CORES cores of THREADS threads.
//
// A thread blocks in the barrier call until either a message arrives for it
// (the call returns 0) or every thread in the whole system is blocked and no
// message is in flight anywhere (the call returns non-zero; 2 when every
// caller voted true). The second condition is found by Safra's
// termination-detection algorithm run at FPGA granularity: inside each FPGA
// (td_fpga) pipelined trees reduce per-core wires to a message count and a
// passive flag; between FPGAs a master (td_master) collects tokens from all
// FPGAs in parallel over a star of channels (td_link, LINK_LATENCY cycles
// each way), then runs the release and re-enable phases.
//
// Interface: the cores themselves are outside this block. Per core they
// supply send_pulse/recv_pulse (a thread sent / received a message this
// cycle); per thread bar_call (enter barrier), bar_vote and msg_avail
// (the mailbox holds a message for the thread), and they get back
// ret_valid/ret_val. send_en[f] is low while FPGA f must not send. status
// and detect report the master's progress.
//
// Timing: from the cycle the last thread blocks (with no message in flight)
// to the release of the calls takes at most about two token rounds of
// 2*LINK_LATENCY plus the tree depth, and one more LINK_LATENCY plus two
// cycles for the release to reach the threads; sending is re-enabled
// 2*LINK_LATENCY later.
//
// Structure and sizes follow the design; giving every FPGA the same
// channel latency, rather than one that grows with its distance from the
// master in the FPGA mesh, is this design's simplification.
module td_system
  import td_pkg::*;
#(
  parameter int unsigned N_FPGA       = 48,
  parameter int unsigned CORES        = 64,
  parameter int unsigned THREADS      = 16,
  parameter int unsigned LINK_LATENCY = 150
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           enable,
  input  logic [N_FPGA-1:0][CORES-1:0]                   send_pulse,
  input  logic [N_FPGA-1:0][CORES-1:0]                   recv_pulse,
  input  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      bar_call,
  input  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      bar_vote,
  input  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      msg_avail,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      ret_valid,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0][1:0] ret_val,
  output logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      in_barrier,
  output logic [N_FPGA-1:0]                              send_en,
  output logic                                           detect,
  output td_status_t                                     status
);
  td_req_t [N_FPGA-1:0] req_m, req_f;
  td_rsp_t [N_FPGA-1:0] rsp_f, rsp_m;

  td_master #(.N_MACH(N_FPGA)) u_master (
    .clk, .rst_n, .enable,
    .req_o   (req_m),
    .rsp_i   (rsp_m),
    .detect_o(detect),
    .status
  );

  for (genvar f = 0; f < int'(N_FPGA); f++) begin : g_fpga
    localparam int unsigned RQ_W = $bits(td_req_t) - 1;
    localparam int unsigned RS_W = $bits(td_rsp_t) - 1;
    logic [RQ_W-1:0] req_d;
    logic [RS_W-1:0] rsp_d;

    td_link #(.W(RQ_W), .LATENCY(LINK_LATENCY)) u_down (
      .clk, .rst_n,
      .in_valid (req_m[f].valid),
      .in_data  (req_m[f][RQ_W-1:0]),
      .out_valid(req_f[f].valid),
      .out_data (req_d)
    );
    assign req_f[f][RQ_W-1:0] = req_d;

    td_link #(.W(RS_W), .LATENCY(LINK_LATENCY)) u_up (
      .clk, .rst_n,
      .in_valid (rsp_f[f].valid),
      .in_data  (rsp_f[f][RS_W-1:0]),
      .out_valid(rsp_m[f].valid),
      .out_data (rsp_d)
    );
    assign rsp_m[f][RS_W-1:0] = rsp_d;

    td_fpga #(.CORES(CORES), .THREADS(THREADS)) u_fpga (
      .clk, .rst_n,
      .send_pulse(send_pulse[f]),
      .recv_pulse(recv_pulse[f]),
      .bar_call  (bar_call[f]),
      .bar_vote  (bar_vote[f]),
      .msg_avail (msg_avail[f]),
      .ret_valid (ret_valid[f]),
      .ret_val   (ret_val[f]),
      .in_barrier(in_barrier[f]),
      .send_en   (send_en[f]),
      .req_i     (req_f[f]),
      .rsp_o     (rsp_f[f])
    );
  end
endmodule
