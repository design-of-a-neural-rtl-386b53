// recognition_sopc: the custom hardware of the shape-recognition
// system-on-chip: the chain-code pre-processing peripheral and the
// neural-network peripheral on one shared processor bus.
//
// The processor (not included) is the bus master. It writes a binary image
// into the pre-processing peripheral, starts it, reads back the 16 slope
// codes, writes them into the network peripheral and reads the recognised
// shape (0 square, 1 circle, 2 rectangle, 3 triangle). Both slaves see the
// same request signals; their acknowledges and read data are ORed onto the
// shared return path, which works because a slave drives zeros whenever it
// is not answering. Address map: network at NN_BASE (256 bytes),
// pre-processing at CC_BASE (4 KiB). The two peripherals and the bus
// between them follow the published system architecture; the processor,
// its memory controller and the bus arbiter are outside this design.
//
// Interface: the master side of the bus (requests in, acknowledges and
// read data out), plus the network's result_valid / result_shape.
module recognition_sopc #(
  parameter logic [31:0] NN_BASE = 32'h8000_0000,
  parameter logic [31:0] CC_BASE = 32'h8001_0000
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

  logic        nn_addrack, nn_wrdack, nn_rddack;
  logic        cc_addrack, cc_wrdack, cc_rddack;
  logic [31:0] nn_rddbus, cc_rddbus;

  nn_plb_ip #(.BASEADDR(NN_BASE)) u_nn (
    .clk, .rst_n, .plb_pavalid, .plb_rnw, .plb_abus, .plb_wrdbus,
    .sl_addrack(nn_addrack), .sl_wrdack(nn_wrdack),
    .sl_rddack(nn_rddack), .sl_rddbus(nn_rddbus),
    .result_valid, .result_shape
  );

  cc_plb_ip #(.BASEADDR(CC_BASE)) u_cc (
    .clk, .rst_n, .plb_pavalid, .plb_rnw, .plb_abus, .plb_wrdbus,
    .sl_addrack(cc_addrack), .sl_wrdack(cc_wrdack),
    .sl_rddack(cc_rddack), .sl_rddbus(cc_rddbus)
  );

  // shared return path: OR of the slaves
  assign sl_addrack = nn_addrack | cc_addrack;
  assign sl_wrdack  = nn_wrdack  | cc_wrdack;
  assign sl_rddack  = nn_rddack  | cc_rddack;
  assign sl_rddbus  = nn_rddbus  | cc_rddbus;

  a_one_slave: assert property (@(posedge clk) disable iff (!rst_n)
                                !(nn_addrack && cc_addrack));

endmodule
