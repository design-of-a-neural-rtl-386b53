// cc_code_mem: storage for one contour's crack code, two bits per move.
//
// Written by the tracer, one code per cycle, and read back by the slope
// normaliser (one code per cycle, combinational) and by the processor
// (16 codes per 32-bit word, code i at bits 2*(i mod 16) +: 2 of word
// i / 16). The depth, MAX_LEN moves, is this implementation's choice; the
// published design only says that the code length depends on the object's
// size and shape.
//
// Interface: we / waddr / wdata (write one code); raddr / rdata (normaliser
// port); word_addr / word_data (processor port, 16 codes per word, code i
// of the word in bits 2i+1:2i).
// Timing: write on the clock edge, reads combinational.
module cc_code_mem
  import cc_pkg::*;
#(
  parameter int unsigned DEPTH = MAX_LEN
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(DEPTH)-1:0]      waddr,
  input  logic [1:0]                    wdata,
  input  logic [$clog2(DEPTH)-1:0]      raddr,
  output logic [1:0]                    rdata,
  input  logic [$clog2(DEPTH / 16)-1:0] word_addr,
  output logic [31:0]                   word_data
);

  logic [1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

  always_comb begin
    for (int k = 0; k < 16; k++)
      word_data[2*k +: 2] = mem[int'(word_addr) * 16 + k];
  end

endmodule
