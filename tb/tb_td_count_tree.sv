// tb_td_count_tree: self-checking test of the pipelined adder tree.
// Uses N = 6 (not a power of two, so padding is exercised) and drives
// random send/receive pulses every cycle, including all-send and
// all-receive bursts. A reference model delays the exact sum of
// (send - recv) by DEPTH = 3 cycles; every output cycle is compared, which
// checks both the value and the latency.
module tb_td_count_tree;
  localparam int unsigned N = 6;
  localparam int unsigned DEPTH = 3;
  localparam int unsigned SUM_W = DEPTH + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] send = '0, recv = '0;
  logic signed [SUM_W-1:0] sum;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  td_count_tree #(.N(N)) dut (.*);

  // history of reference sums, newest first
  int hist [DEPTH+1];
  int valid_cycles = 0;

  function automatic int ref_sum(logic [N-1:0] s, logic [N-1:0] r);
    int v = 0;
    for (int i = 0; i < int'(N); i++) v += int'(s[i]) - int'(r[i]);
    return v;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // compare against the input of DEPTH cycles ago
    if (valid_cycles >= int'(DEPTH)) begin
      checks++;
      if (int'(sum) != hist[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("FAIL: sum %0d expected %0d", sum, hist[DEPTH-1]);
      end
    end
    for (int k = DEPTH; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = ref_sum(send, recv);
    valid_cycles++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      unique case (n % 50)
        10: begin send = '1; recv = '0; end
        20: begin send = '0; recv = '1; end
        30: begin send = '1; recv = '1; end
        default: begin send = N'($urandom); recv = N'($urandom); end
      endcase
    end
    repeat (DEPTH + 2) @(negedge clk);
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
