// cc_plb_ip: the chain-code pre-processing peripheral: bus slave
// (plb_cc_slave) plus the pre-processing core (chain_code_core). The
// processor writes a binary image, starts the unit and reads back the
// 16 slope codes (and, if it wants, the crack code itself and the origin).
// See those modules for the register map and the timing.
module cc_plb_ip
  import cc_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h8001_0000
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
  output logic [31:0] sl_rddbus
);

  logic                                  img_we, start, busy, done;
  logic [$clog2(IMG_H * IMG_W / 32)-1:0] img_waddr;
  logic [31:0]                           img_wdata, code_word;
  logic [$clog2(MAX_LEN + 1)-1:0]        len;
  logic [$clog2(IMG_W + 1)-1:0]          org_x;
  logic [$clog2(IMG_H + 1)-1:0]          org_y;
  logic                                  no_object, overflow;
  logic [SLW-1:0]                        slope [N_SEG];
  logic [$clog2(MAX_LEN / 16)-1:0]       code_word_addr;

  plb_cc_slave #(.BASEADDR(BASEADDR)) u_slave (
    .clk, .rst_n,
    .plb_pavalid, .plb_rnw, .plb_abus, .plb_wrdbus,
    .sl_addrack, .sl_wrdack, .sl_rddack, .sl_rddbus,
    .img_we, .img_waddr, .img_wdata,
    .core_start(start), .core_busy(busy), .core_done(done),
    .core_len(len), .core_org_x(org_x), .core_org_y(org_y),
    .core_no_object(no_object), .core_overflow(overflow),
    .core_slope(slope), .code_word_addr, .code_word
  );

  chain_code_core u_core (
    .clk, .rst_n, .img_we, .img_waddr, .img_wdata,
    .start, .busy, .done, .len, .org_x, .org_y, .no_object, .overflow,
    .slope, .code_word_addr, .code_word
  );

endmodule
