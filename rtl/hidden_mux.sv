// hidden_mux: the N-to-1 multiplexer between the activation ROM and the
// output layer.
//
// The hidden layer produces its N activated outputs in parallel; the output
// layer, built like the hidden layer, takes one input per cycle. The
// controller steps sel through 0..N-1 so that the hidden outputs reach the
// output layer serially. The multiplexer and its role follow the published
// design; a sel outside 0..N-1 gives 0, which is this implementation's
// choice and is used to feed zero into the pipeline-drain cycle.
//
// Interface: din[i] (activated output of hidden neuron i), sel, dout.
// Timing: combinational.
module hidden_mux #(
  parameter int unsigned N   = 32,
  parameter int unsigned W   = 8,
  parameter int unsigned S_W = $clog2(N) + 1
) (
  input  logic signed [W-1:0] din [N],
  input  logic [S_W-1:0]      sel,
  output logic signed [W-1:0] dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++)
      if (int'(sel) == i) dout = din[i];
  end

endmodule
