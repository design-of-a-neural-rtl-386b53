// cc_image_mem: the binary image buffer of the chain-code unit.
//
// Holds an IMG_W x IMG_H binary image (1 = white, object) as IMG_H rows of
// IMG_W bits. The processor fills it with 32-bit writes: word n holds row
// n / (IMG_W/32), pixels 32*(n mod (IMG_W/32)) .. +31, pixel x at bit x mod 32.
// Two combinational row-read ports serve the tracer, which needs the rows
// above and below a contour vertex at the same time; a row index of IMG_H or
// more reads as all background. The buffer and its organisation are this
// implementation's choice: the published system keeps the image in the
// processor's memory.
//
// Interface: we / waddr / wdata (32-bit word write), ra / rb (row indices,
// one bit wider than needed), row_a / row_b (row contents).
// Timing: write on the clock edge, reads combinational.
module cc_image_mem
  import cc_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic                             clk,
  input  logic                             we,
  input  logic [$clog2(H * W / 32)-1:0]    waddr,
  input  logic [31:0]                      wdata,
  input  logic [$clog2(H + 1):0]           ra,
  input  logic [$clog2(H + 1):0]           rb,
  output logic [W-1:0]                     row_a,
  output logic [W-1:0]                     row_b
);

  localparam int unsigned WPR = W / 32;   // words per row

  logic [W-1:0] img [H];

  always_ff @(posedge clk) begin
    if (we) img[waddr / WPR][32 * (waddr % WPR) +: 32] <= wdata;
  end

  always_comb begin
    row_a = (int'(ra) < H) ? img[ra[$clog2(H)-1:0]] : '0;
    row_b = (int'(rb) < H) ? img[rb[$clog2(H)-1:0]] : '0;
  end

endmodule
