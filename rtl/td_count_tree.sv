// td_count_tree: pipelined adder tree turning per-core send/receive pulse
// wires into one signed number per cycle: (sends - receives).
//
// Every core drives two wires, pulsed when one of its threads sends or
// receives a message. Each leaf forms send - recv (-1, 0 or +1); a binary
// tree of registered adders then sums the leaves, one register stage per
// level, so the result appears DEPTH = clog2(N) cycles after the pulses
// (one stage when N is 1). The inputs are padded with zeros up to a power
// of two. The tree never stalls: it accepts new pulses every cycle.
//
// The reduction to one signed count through a pipelined tree follows the
// design; the binary arity, one stage per level and the padding are this
// design's choices. td_and_tree uses the same DEPTH so that count and
// passive state are sampled at the same moment.
module td_count_tree #(
  parameter int unsigned N     = 64,
  parameter int unsigned DEPTH = (N <= 1) ? 1 : $clog2(N),
  parameter int unsigned SUM_W = DEPTH + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            send,
  input  logic [N-1:0]            recv,
  output logic signed [SUM_W-1:0] sum
);
  localparam int unsigned P = 1 << DEPTH;  // padded leaf count

  // Heap layout: node 0 is the root, node i has children 2i+1 and 2i+2,
  // leaves are nodes P-1 .. 2P-2.
  logic signed [SUM_W-1:0] node [2*P-1];

  for (genvar i = 0; i < int'(P); i++) begin : g_leaf
    if (i < int'(N)) begin : g_real
      assign node[P-1+i] = SUM_W'($signed({1'b0, send[i]})) - SUM_W'($signed({1'b0, recv[i]}));
    end else begin : g_pad
      assign node[P-1+i] = '0;
    end
  end

  for (genvar i = 0; i < int'(P) - 1; i++) begin : g_add
    always_ff @(posedge clk) begin
      if (!rst_n) node[i] <= '0;
      else        node[i] <= node[2*i+1] + node[2*i+2];
    end
  end

  assign sum = node[0];
endmodule
