// td_and_tree: pipelined conjunction tree reducing one wire per core to a
// single wire for the whole FPGA.
//
// Used for the "all threads of this core are in the barrier call" wires
// (giving the FPGA's passive/active state), and also for the vote wires and,
// with inverted inputs and output, as an OR of the receive pulses. It has
// exactly the structure and depth of td_count_tree: a binary tree of
// registered AND gates, one stage per level, DEPTH = clog2(N) cycles from
// input to output, inputs padded with ones. Registers reset to RST_VAL: by
// default 0, so the output reads "not all" until real samples have passed
// through; the inverted OR use sets 1 so that it reads "no receive".
//
// The pipelined conjunction tree with the same depth as the adder tree
// follows the design; arity, padding and reset value are this design's own.
module td_and_tree #(
  parameter int unsigned N     = 64,
  parameter int unsigned DEPTH = (N <= 1) ? 1 : $clog2(N),
  parameter bit          RST_VAL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);
  localparam int unsigned P = 1 << DEPTH;

  logic node [2*P-1];

  for (genvar i = 0; i < int'(P); i++) begin : g_leaf
    if (i < int'(N)) begin : g_real
      assign node[P-1+i] = in[i];
    end else begin : g_pad
      assign node[P-1+i] = 1'b1;
    end
  end

  for (genvar i = 0; i < int'(P) - 1; i++) begin : g_and
    always_ff @(posedge clk) begin
      if (!rst_n) node[i] <= RST_VAL;
      else        node[i] <= node[2*i+1] & node[2*i+2];
    end
  end

  assign out = node[0];
endmodule
