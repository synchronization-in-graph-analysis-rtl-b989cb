// tb_td_and_tree: self-checking test of the pipelined conjunction tree.
// Uses N = 5 (padding exercised) with inputs that are mostly ones, so the
// output is true often, and compares every output cycle with the AND of the
// inputs DEPTH = 3 cycles earlier. Also checks the reset value and that the
// RST_VAL = 1 variant (used for the receive OR tree) resets to 1.
module tb_td_and_tree;
  localparam int unsigned N = 5;
  localparam int unsigned DEPTH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in = '1;
  logic out, out1;
  int checks = 0, failures = 0;
  int n_true = 0;

  always #5 clk = ~clk;

  td_and_tree #(.N(N)) dut (.*);
  td_and_tree #(.N(N), .RST_VAL(1'b1)) dut1 (.clk, .rst_n, .in, .out(out1));

  logic hist [DEPTH+1];
  int valid_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (valid_cycles >= int'(DEPTH)) begin
      checks++;
      if (out != hist[DEPTH-1] || out1 != hist[DEPTH-1]) begin
        failures++;
        if (failures < 10) $display("FAIL: out %0b/%0b expected %0b", out, out1, hist[DEPTH-1]);
      end
      if (out) n_true++;
    end
    for (int k = DEPTH; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = &in;
    valid_cycles++;
  end

  initial begin
    repeat (3) @(negedge clk);
    checks++;
    if (out !== 1'b0 || out1 !== 1'b1) begin
      failures++;
      $display("FAIL: reset values %0b %0b", out, out1);
    end
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      for (int i = 0; i < int'(N); i++) in[i] = ($urandom % 8) != 0;
    end
    repeat (DEPTH + 2) @(negedge clk);
    checks++;
    if (n_true < 20) begin
      failures++;
      $display("FAIL: output true only %0d times", n_true);
    end
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
