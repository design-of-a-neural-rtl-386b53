// max_finder: picks the output neuron with the largest sum.
//
// Compares the N signed sums of the output layer and registers the index of
// the largest as the recognised shape (a 2-bit code for N=4), in a single
// clock cycle. On equal sums the lower index wins (this implementation's
// choice). The function and the one-cycle timing follow the published
// design.
//
// Interface: en (compare now), din[i] (sum of output neuron i), idx (index of
// the maximum), valid (idx was updated in the previous cycle).
// Timing: idx and valid are registered; valid is a one-cycle pulse after en.
module max_finder #(
  parameter int unsigned N   = 4,
  parameter int unsigned W   = 22,
  parameter int unsigned I_W = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din [N],
  output logic [I_W-1:0]      idx,
  output logic                valid
);

  logic [I_W-1:0]      best_idx;
  logic signed [W-1:0] best_val;

  always_comb begin
    best_idx = '0;
    best_val = din[0];
    for (int i = 1; i < N; i++) begin
      if (din[i] > best_val) begin
        best_val = din[i];
        best_idx = I_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx   <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) idx <= best_idx;
    end
  end

endmodule
