// rom1_weights: weight memory of the hidden layer (ROM1).
//
// 512 signed 12-bit weights organised as 16 blocks of 32, one block per
// network input. Presenting the index of the current input on blk returns
// the whole block at once, one weight for each of the 32 hidden neurons.
// Word k of block b sits at address b*32+k of CONTENTS, by default the
// table of nn_tables_pkg. Size, word length and block organisation follow
// the published design; the asynchronous (LUT-ROM) read, which lets the
// weights arrive in the same cycle as the serial input, is this
// implementation's choice.
//
// Interface: blk (block index), w[k] (weight for hidden neuron k).
// Timing: combinational read.
module rom1_weights #(
  parameter int unsigned N_BLK     = 16,
  parameter int unsigned BLK_SIZE  = 32,
  parameter int unsigned W_W       = 12,
  parameter logic signed [W_W-1:0] CONTENTS [N_BLK * BLK_SIZE] = nn_tables_pkg::rom1_init()
) (
  input  logic [$clog2(N_BLK)-1:0] blk,
  output logic signed [W_W-1:0]    w [BLK_SIZE]
);

  always_comb begin
    for (int k = 0; k < BLK_SIZE; k++)
      w[k] = CONTENTS[int'(blk) * BLK_SIZE + k];
  end

endmodule
