// td_link: one direction of the control channel between the master and a
// worker FPGA, reduced to its latency.
//
// An item presented with in_valid appears on out_valid/out_data exactly
// LATENCY cycles later (LATENCY >= 1). In the cluster this path crosses the
// reliable inter-FPGA links and the mesh; here only the delay is kept. The
// termination protocol never has more than one item in flight in either
// direction, so the channel holds a single item and a down-counter instead
// of a LATENCY-deep shift register; an assertion checks that rule.
//
// The latency value follows the inter-machine latency measured for the
// platform; the single-slot structure is this design's choice.
module td_link #(
  parameter int unsigned W       = 8,
  parameter int unsigned LATENCY = 150
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);
  localparam int unsigned CW = $clog2(LATENCY + 1);

  logic          busy;
  logic [CW-1:0] left;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      left      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (LATENCY == 1) begin
          out_valid <= 1'b1;
          out_data  <= in_data;
        end else begin
          busy     <= 1'b1;
          left     <= CW'(LATENCY - 2);
          out_data <= in_data;
        end
      end else if (busy) begin
        if (left == '0) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end else begin
          left <= left - 1'b1;
        end
      end
    end
  end

  a_single_item: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> !busy);
endmodule
