// tb_td_system: end-to-end test of the termination-detection system at a
// reduced size (3 FPGAs x 4 cores x 2 threads, channel latency 10 cycles).
// tb_sssp_driver runs single-source shortest path four times on a 24-vertex
// small-world grid: synchronized and asynchronous, unweighted and weighted,
// checking distances, the safety and latency of every barrier release and
// that every mechanism of the design occurred.
module tb_td_system;
  import td_pkg::*;
  localparam int unsigned N_FPGA = 3, CORES = 4, THREADS = 2, L = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, enable, detect;
  logic [N_FPGA-1:0][CORES-1:0]                   send_pulse, recv_pulse;
  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0]      bar_call, bar_vote, msg_avail, ret_valid, in_barrier;
  logic [N_FPGA-1:0][CORES-1:0][THREADS-1:0][1:0] ret_val;
  logic [N_FPGA-1:0]                              send_en;
  td_status_t                                     status;

  td_system #(.N_FPGA(N_FPGA), .CORES(CORES), .THREADS(THREADS), .LINK_LATENCY(L)) dut (.*);

  tb_sssp_driver #(.N_FPGA(N_FPGA), .CORES(CORES), .THREADS(THREADS), .LINK_LATENCY(L),
                   .MAXD(120), .CHORDS(3), .RUNS(15), .REQUIRE_ALL(1'b1),
                   .WATCHDOG(400000)) drv (.*);

  // Backstop watchdog (the driver has its own, shorter one).
  initial begin
    repeat (1_000_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
