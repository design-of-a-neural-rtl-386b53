// chain_code_core: the image pre-processing unit, from a binary image to the
// 16-value slope signature that the neural network classifies.
//
// The processor writes the binary image into the image buffer and starts
// the unit. The crack tracer finds the object region and its origin and
// writes the clockwise crack code of the contour into the code memory; the
// slope normaliser then cuts the code into 16 pieces and quantises the
// direction between the end points of each. A contour that does not fit the
// code memory is truncated and flagged; an image without an object ends the
// run at once with no_object set. The processing chain follows the
// published pre-processing algorithm; doing it in hardware follows the
// published system architecture, which shows the chain-code algorithm as a
// custom peripheral, while its text runs it in software.
//
// Interface: img_we / img_waddr / img_wdata (image writes), start, busy,
// done (one-cycle pulse), len / org_x / org_y / no_object / overflow (trace
// results), slope[k] (signature), code_word_addr / code_word (read-back of
// the code, 16 codes per word).
// Timing: IMG_H + 1 scan cycles + one per code + (codes + 16) normalising
// cycles + 2 hand-over cycles.
module chain_code_core
  import cc_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              img_we,
  input  logic [$clog2(IMG_H * IMG_W / 32)-1:0] img_waddr,
  input  logic [31:0]                       img_wdata,
  input  logic                              start,
  output logic                              busy,
  output logic                              done,
  output logic [$clog2(MAX_LEN + 1)-1:0]    len,
  output logic [$clog2(IMG_W + 1)-1:0]      org_x,
  output logic [$clog2(IMG_H + 1)-1:0]      org_y,
  output logic                              no_object,
  output logic                              overflow,
  output logic [SLW-1:0]                    slope [N_SEG],
  input  logic [$clog2(MAX_LEN / 16)-1:0]   code_word_addr,
  output logic [31:0]                       code_word
);

  logic [$clog2(IMG_H + 1):0] ra, rb;
  logic [IMG_W-1:0]           row_a, row_b;

  cc_image_mem u_img (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .ra, .rb, .row_a, .row_b
  );

  logic                       code_we;
  logic [$clog2(MAX_LEN)-1:0] code_addr, n_raddr;
  logic [1:0]                 code, n_rdata;
  logic                       t_busy, t_done;

  crack_tracer u_trace (
    .clk, .rst_n, .start,
    .ra, .rb, .row_a, .row_b,
    .code_we, .code_addr, .code,
    .busy(t_busy), .done(t_done), .len, .org_x, .org_y, .no_object, .overflow
  );

  cc_code_mem u_codes (
    .clk, .we(code_we), .waddr(code_addr), .wdata(code),
    .raddr(n_raddr), .rdata(n_rdata),
    .word_addr(code_word_addr), .word_data(code_word)
  );

  logic n_start, n_busy, n_done;

  // the normaliser starts in the cycle after a successful trace
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) n_start <= 1'b0;
    else        n_start <= t_done && !no_object;
  end

  slope_normalizer u_norm (
    .clk, .rst_n, .start(n_start), .len,
    .raddr(n_raddr), .rdata(n_rdata),
    .busy(n_busy), .done(n_done), .slope
  );

  assign busy = t_busy || (t_done && !no_object) || n_start || n_busy;
  assign done = n_done || (t_done && no_object);

endmodule
