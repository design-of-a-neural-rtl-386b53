// mac: one neuron of the network, a two-stage pipelined multiply-accumulate.
//
// Stage 1 registers the product input*weight; stage 2 adds the registered
// product to the accumulator. A synchronous reset loads the accumulator with
// the neuron's offset (bias) and clears the product register, so the first
// enabled cycle adds nothing and every later enabled cycle adds the product
// of the previous one. Summing K inputs therefore takes K+1 enabled cycles:
// one per input plus one to drain the pipeline, and a new input can be taken
// every cycle. The structure (multiplier, accumulator with feedback, offset
// load, RESET / CLK-ENABLE / CLK pins) follows the published MAC schematic;
// the signed two's-complement arithmetic and the operand widths are choices
// of this implementation.
//
// Interface: rst (load offset), ce (clock enable of both stages),
// x, w (operands), offset (initial value), acc (running sum, registered).
// Timing: acc includes the product of the operands of enabled cycle n at the
// end of enabled cycle n+1.
module mac #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned W_W   = 12,
  parameter int unsigned ACC_W = 25
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [W_W-1:0]   w,
  input  logic signed [ACC_W-1:0] offset,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned P_W = IN_W + W_W;

  logic signed [P_W-1:0] prod_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      prod_q <= '0;
      acc    <= offset;
    end else if (ce) begin
      prod_q <= x * w;
      acc    <= acc + ACC_W'(prod_q);
    end
  end

endmodule
