// rom2_weights: weight memory of the output layer (ROM2).
//
// 128 signed 8-bit weights organised as 32 blocks of 4, one block per hidden
// neuron. While hidden output j is on the serial bus, blk = j returns the
// four weights that connect it to the four output neurons. Word k of block b
// is at address b*4+k of CONTENTS, by default the table of nn_tables_pkg. Size, word length and organisation follow the published
// design; the asynchronous read is this implementation's choice.
//
// Interface: blk (block index = hidden neuron), w[k] (weight for output k).
// Timing: combinational read.
module rom2_weights #(
  parameter int unsigned N_BLK     = 32,
  parameter int unsigned BLK_SIZE  = 4,
  parameter int unsigned W_W       = 8,
  parameter logic signed [W_W-1:0] CONTENTS [N_BLK * BLK_SIZE] = nn_tables_pkg::rom2_init()
) (
  input  logic [$clog2(N_BLK)-1:0] blk,
  output logic signed [W_W-1:0]    w [BLK_SIZE]
);

  always_comb begin
    for (int k = 0; k < BLK_SIZE; k++)
      w[k] = CONTENTS[int'(blk) * BLK_SIZE + k];
  end

endmodule
