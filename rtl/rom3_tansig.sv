// rom3_tansig: the pre-computed tan-sigmoid activation (ROM3).
//
// 256 signed 8-bit values shared by all hidden neurons. The table holds
// round(127 * tanh((i - 128) / 32)) at address i, i.e. the address is a
// signed pre-activation z in units of 1/32 offset by 128, covering
// -4.0 <= z < 4.0, and the output is tanh(z) in units of 1/127. The table
// is computed at elaboration time (nn_tables_pkg::rom3_init). All N_PORTS
// neurons are looked up at once: the memory has N_PORTS read ports and the
// results are registered, so one enabled cycle activates the whole layer.
// Size, word length and single-cycle parallel access follow the published
// design; the scaling of address and data is this implementation's choice.
//
// Interface: en (register new results), addr[i] / dout[i] for neuron i.
// Timing: dout valid in the cycle after en.
module rom3_tansig #(
  parameter int unsigned N_PORTS   = 32,
  parameter int unsigned A_W       = 8,
  parameter int unsigned D_W       = 8,
  parameter logic signed [D_W-1:0] CONTENTS [2**A_W] = nn_tables_pkg::rom3_init()
) (
  input  logic                  clk,
  input  logic                  en,
  input  logic [A_W-1:0]        addr [N_PORTS],
  output logic signed [D_W-1:0] dout [N_PORTS]
);

  always_ff @(posedge clk) begin
    if (en) begin
      for (int i = 0; i < N_PORTS; i++)
        dout[i] <= CONTENTS[addr[i]];
    end
  end

endmodule
