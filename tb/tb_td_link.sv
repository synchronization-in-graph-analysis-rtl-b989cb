// tb_td_link: self-checking test of the fixed-latency control channel.
// Sends items with random gaps (never two in flight, as the protocol
// guarantees) and checks each comes out exactly LATENCY cycles later with
// its data intact, and that nothing else comes out.
module tb_td_link;
  localparam int unsigned W = 12;
  localparam int unsigned LATENCY = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [W-1:0] in_data = '0;
  logic out_valid;
  logic [W-1:0] out_data;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  td_link #(.W(W), .LATENCY(LATENCY)) dut (.*);

  // Expected output: time stamp and data of the item in flight.
  int exp_cycle = -1;
  logic [W-1:0] exp_data;

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (cycle != exp_cycle || out_data != exp_data) begin
        failures++;
        $display("FAIL: out at %0d data %h, expected at %0d data %h", cycle, out_data, exp_cycle, exp_data);
      end
    end else if (cycle == exp_cycle) begin
      checks++; failures++;
      $display("FAIL: missing output at %0d", cycle);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 40; n++) begin
      // Inputs change on the falling edge; at that point `cycle` counts the
      // rising edges so far, and the output is checked on the rising edge
      // LATENCY edges after the one that takes the item.
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = W'($urandom);
      exp_data = in_data;
      exp_cycle = cycle + LATENCY;
      @(negedge clk);
      in_valid = 1'b0;
      repeat (LATENCY - 1 + ($urandom % 4)) @(negedge clk);
    end
    repeat (LATENCY + 3) @(posedge clk);
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
