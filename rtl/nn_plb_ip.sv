// nn_plb_ip: the neural-network custom peripheral of the recognition
// system-on-chip, ready to hang on the processor's PLB.
//
// The processor takes the 16-value chain-code slope signature of an object
// (from the pre-processing peripheral, or from its own software) and writes
// the 16 values into this peripheral over the bus; the peripheral classifies the object as
// square, circle, rectangle or triangle with a 16-32-4 perceptron and
// returns the 2-bit shape code in its STATUS register. It consists of the
// bus slave (plb_nn_slave, with the input buffer and registers) and the
// network (nn_core). See those modules for the register map and the
// cycle-by-cycle operation.
//
// Interface: the simplified PLB slave port of plb_nn_slave, plus
// result_valid / result_shape, a copy of the classification result for
// on-chip observation.
// Timing: a classification starts the cycle after the 16th DATA write is
// acknowledged and its result is valid nn_pkg::LATENCY+1 cycles later.
module nn_plb_ip
  import nn_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        plb_pavalid,
  input  logic        plb_rnw,
  input  logic [31:0] plb_abus,
  input  logic [31:0] plb_wrdbus,
  output logic        sl_addrack,
  output logic        sl_wrdack,
  output logic        sl_rddack,
  output logic [31:0] sl_rddbus,
  output logic        result_valid,
  output logic [1:0]  result_shape
);

  logic                    start, busy, done;
  logic [$clog2(N_IN)-1:0] in_idx;
  x_t                      x;
  shape_e                  shape;
  acc2_t                   score [N_OUT];

  plb_nn_slave #(.BASEADDR(BASEADDR)) u_slave (
    .clk, .rst_n,
    .plb_pavalid, .plb_rnw, .plb_abus, .plb_wrdbus,
    .sl_addrack, .sl_wrdack, .sl_rddack, .sl_rddbus,
    .core_start  (start),
    .core_in_idx (in_idx),
    .core_x      (x),
    .core_busy   (busy),
    .core_done   (done),
    .core_shape  (shape),
    .core_score  (score)
  );

  nn_core u_core (
    .clk, .rst_n, .start, .in_idx, .x_in(x),
    .busy, .done, .shape, .score
  );

  assign result_valid = done;
  assign result_shape = shape;

endmodule
