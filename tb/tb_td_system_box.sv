// tb_td_system_box: one complete operation of td_system at its full size:
// 48 FPGAs x 64 cores x 16 threads (49,152 threads) with a 150-cycle
// channel latency, every parameter left at its default. tb_sssp_driver
// runs asynchronous single-source shortest path on a 49,152-vertex
// 2D grid with 1,024 random long-range edges: the threads compute until
// the whole cluster is quiet, the hardware detects termination (first
// release: every step handler votes to stop), detects it again and
// releases every thread with "all voted true". Distances, release safety
// and release latency are checked.
module tb_td_system_box;
  import td_pkg::*;
  localparam int unsigned N_FPGA = 6, CORES = 64, THREADS = 16, L = 150;

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
                   .MAXD(64), .CHORDS(128), .RUNS(2), .REQUIRE_ALL(1'b0),
                   .WATCHDOG(200000)) drv (.*);

  // Backstop watchdog (the driver has its own, shorter one).
  initial begin
    repeat (400_000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
