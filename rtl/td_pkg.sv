// td_pkg: types shared by the hardware termination-detection (refutable
// barrier) system.
//
// The master and each worker FPGA exchange short control items over a
// dedicated channel. The master sends requests (a Safra token, a
// "termination detected" release carrying the global vote, or a
// "re-enable sending" notice); each FPGA answers with a token reply
// (its message count, its colour and its vote) or an acknowledgement.
// The three request kinds and two reply kinds follow the three-phase
// procedure of the design; the field widths and encodings are this
// design's own choice.
package td_pkg;

  // Width of the running sent-minus-received message count kept by each
  // FPGA and summed by the master. Wide enough for any realistic number of
  // messages in flight across the cluster.
  localparam int unsigned COUNT_W = 32;

  typedef enum logic [1:0] {
    REQ_TOKEN     = 2'd0,  // phase 1: sample count/colour/vote once passive
    REQ_TERMINATE = 2'd1,  // phase 2: release all barrier calls, stop sending
    REQ_REENABLE  = 2'd2   // phase 3: allow sending again
  } req_kind_e;

  typedef enum logic [0:0] {
    RSP_TOKEN = 1'b0,      // token reply: count, colour and vote are valid
    RSP_ACK   = 1'b1       // acknowledgement of TERMINATE or REENABLE
  } rsp_kind_e;

  // Master -> FPGA.
  typedef struct packed {
    logic      valid;
    req_kind_e kind;
    logic      vote;        // with REQ_TERMINATE: every caller voted true
  } td_req_t;

  // FPGA -> master.
  typedef struct packed {
    logic                      valid;
    rsp_kind_e                 kind;
    logic                      black;  // FPGA received a message since last reply
    logic                      vote;   // every thread voted true
    logic signed [COUNT_W-1:0] count;  // messages sent minus received, cumulative
  } td_rsp_t;

  typedef enum logic [2:0] {
    M_IDLE,         // waiting for enable
    M_TOKEN_SEND,   // broadcast tokens
    M_TOKEN_WAIT,   // collect token replies
    M_TERM_SEND,    // broadcast "termination detected"
    M_TERM_WAIT,    // collect acknowledgements
    M_REEN_SEND,    // broadcast "re-enable sending"
    M_REEN_WAIT     // collect acknowledgements
  } master_state_e;

  // Counters exported by the master for monitoring.
  typedef struct packed {
    master_state_e state;
    logic [31:0]   rounds;          // token rounds completed
    logic [31:0]   refuted_black;   // rounds refuted by a black token
    logic [31:0]   refuted_count;   // rounds refuted by a non-zero sum (white)
    logic [31:0]   detections;      // terminations detected
    logic          last_vote;       // vote of the latest detection
  } td_status_t;

endpackage
