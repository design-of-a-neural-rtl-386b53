// plb_cc_slave: processor-bus slave of the chain-code pre-processing unit.
//
// Same single-beat bus protocol as plb_nn_slave: the master holds pavalid
// with rnw, abus and wrdbus until addrack; the slave answers one or more
// cycles later with addrack plus wrdack or rddack for one cycle, and drives
// rddbus to zero at all other times so that slave read buses can be ORed.
//
// Register map (byte offsets from BASEADDR):
//   0x000-0x1FC IMAGE   W  binary image, word n = row n/2, pixels
//                          32*(n mod 2)..+31, pixel x at bit x mod 32
//   0x400-0x4FC CODE    R  crack code, 16 two-bit codes per word
//   0x800       CONTROL W  [0] = 1: start
//   0x804       STATUS  R  [0] done (cleared by start), [1] busy,
//                          [2] no object, [3] overflow, [26:16] length
//   0x808       ORIGIN  R  [6:0] origin x, [14:8] origin y
//   0x840-0x87C SLOPE0-15 R  slope code of piece k
//   other offsets below SPAN read as 0 and ignore writes.
// While the unit runs, IMAGE writes get wait states (the acknowledge is
// withheld) so that the image cannot change under the tracer, and a start
// is ignored. The register map and the wait-state rule are this
// implementation's choices.
module plb_cc_slave
  import cc_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h8001_0000,
  parameter int unsigned SPAN     = 4096
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              plb_pavalid,
  input  logic                              plb_rnw,
  input  logic [31:0]                       plb_abus,
  input  logic [31:0]                       plb_wrdbus,
  output logic                              sl_addrack,
  output logic                              sl_wrdack,
  output logic                              sl_rddack,
  output logic [31:0]                       sl_rddbus,
  // pre-processing core
  output logic                              img_we,
  output logic [$clog2(IMG_H * IMG_W / 32)-1:0] img_waddr,
  output logic [31:0]                       img_wdata,
  output logic                              core_start,
  input  logic                              core_busy,
  input  logic                              core_done,
  input  logic [$clog2(MAX_LEN + 1)-1:0]    core_len,
  input  logic [$clog2(IMG_W + 1)-1:0]      core_org_x,
  input  logic [$clog2(IMG_H + 1)-1:0]      core_org_y,
  input  logic                              core_no_object,
  input  logic                              core_overflow,
  input  logic [SLW-1:0]                    core_slope [N_SEG],
  output logic [$clog2(MAX_LEN / 16)-1:0]   code_word_addr,
  input  logic [31:0]                       code_word
);

  localparam int unsigned IMG_WORDS  = IMG_H * IMG_W / 32;
  localparam int unsigned CODE_WORDS = MAX_LEN / 16;
  localparam logic [11:0] OFF_IMAGE  = 12'h000;
  localparam logic [11:0] OFF_CODE   = 12'h400;
  localparam logic [11:0] OFF_CTRL   = 12'h800;
  localparam logic [11:0] OFF_STATUS = 12'h804;
  localparam logic [11:0] OFF_ORIGIN = 12'h808;
  localparam logic [11:0] OFF_SLOPE  = 12'h840;

  logic [31:0] offset;
  logic [11:0] off;
  logic        hit, is_img, is_img_wr, stall, take;
  logic        ack_q, rnw_q, done_flag;
  logic [31:0] rdata_q;

  assign offset    = plb_abus - BASEADDR;
  assign off       = offset[11:0];
  assign hit       = plb_pavalid && (plb_abus >= BASEADDR) && (offset < SPAN);
  assign is_img    = (off < OFF_IMAGE + 12'(4 * IMG_WORDS));
  assign is_img_wr = !plb_rnw && is_img;
  assign stall     = is_img_wr && (core_busy || core_start);
  assign take      = hit && !ack_q && !stall;

  // the code memory is read through a combinational port
  assign code_word_addr = ($clog2(CODE_WORDS))'((off - OFF_CODE) >> 2);

  logic [11:0] slope_k;
  assign slope_k = (off - OFF_SLOPE) >> 2;

  always_comb begin
    img_we    = take && is_img_wr;
    img_waddr = ($clog2(IMG_WORDS))'(off >> 2);
    img_wdata = plb_wrdbus;
  end

  function automatic logic [31:0] read_reg();
    logic [31:0] r;
    r = '0;
    if (off >= OFF_CODE && off < OFF_CODE + 12'(4 * CODE_WORDS)) begin
      r = code_word;
    end else if (off == OFF_STATUS) begin
      r[0]     = done_flag;
      r[1]     = core_busy || core_start;
      r[2]     = core_no_object;
      r[3]     = core_overflow;
      r[16 +: $clog2(MAX_LEN + 1)] = core_len;
    end else if (off == OFF_ORIGIN) begin
      r[0 +: $clog2(IMG_W + 1)] = core_org_x;
      r[8 +: $clog2(IMG_H + 1)] = core_org_y;
    end else if (off >= OFF_SLOPE && off < OFF_SLOPE + 12'(4 * N_SEG)) begin
      r[SLW-1:0] = core_slope[slope_k[$clog2(N_SEG)-1:0]];
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q      <= 1'b0;
      rnw_q      <= 1'b0;
      rdata_q    <= '0;
      done_flag  <= 1'b0;
      core_start <= 1'b0;
    end else begin
      ack_q      <= take;
      core_start <= 1'b0;
      if (core_done) done_flag <= 1'b1;
      if (take) begin
        rnw_q <= plb_rnw;
        if (plb_rnw) begin
          rdata_q <= read_reg();
        end else if (off == OFF_CTRL && plb_wrdbus[0] && !core_busy && !core_start) begin
          core_start <= 1'b1;
          done_flag  <= 1'b0;
        end
      end
    end
  end

  assign sl_addrack = ack_q;
  assign sl_wrdack  = ack_q && !rnw_q;
  assign sl_rddack  = ack_q && rnw_q;
  assign sl_rddbus  = sl_rddack ? rdata_q : '0;

  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                    sl_addrack |=> !sl_addrack);
  a_rd_zero:       assert property (@(posedge clk) disable iff (!rst_n)
                                    !sl_rddack |-> (sl_rddbus == '0));
  a_img_stable:    assert property (@(posedge clk) disable iff (!rst_n)
                                    core_busy |-> !img_we);

endmodule
