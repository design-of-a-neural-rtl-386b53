// mac_layer: one layer of the processing module, N neurons working in
// parallel on the same serial input.
//
// Every cycle the layer receives one input sample, broadcast to all N MAC
// neurons, together with one weight per neuron (a block read from the
// layer's weight ROM). Each neuron starts from its own bias, a constant
// given by the BIAS parameter (one signed ACC_W-bit value per neuron). The hidden layer is this module with N=32
// and the output layer with N=4; keeping the bias next to the MAC follows the
// published MAC, which shows the offset inside the neuron. Where the bias
// values are stored is this implementation's choice.
//
// Interface: rst loads the biases, ce advances all neurons, x is the shared
// input, w[i] the weight of neuron i, acc[i] its running sum.
// Timing: as for mac, K inputs need K+1 enabled cycles.
module mac_layer #(
  parameter int unsigned N         = 32,
  parameter int unsigned IN_W      = 8,
  parameter int unsigned W_W       = 12,
  parameter int unsigned ACC_W     = 25,
  parameter logic signed [ACC_W-1:0] BIAS [N] = nn_tables_pkg::bias1_init()
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [W_W-1:0]   w   [N],
  output logic signed [ACC_W-1:0] acc [N]
);

  for (genvar i = 0; i < N; i++) begin : g_neuron
    mac #(.IN_W(IN_W), .W_W(W_W), .ACC_W(ACC_W)) u_mac (
      .clk    (clk),
      .rst    (rst),
      .ce     (ce),
      .x      (x),
      .w      (w[i]),
      .offset (BIAS[i]),
      .acc    (acc[i])
    );
  end

endmodule
