// nn_core: the shape-recognition multi-layer perceptron (16 inputs,
// 32 tan-sigmoid hidden neurons, 4 linear output neurons).
//
// The inputs are consumed serially, one per cycle: the controller presents
// an input index on in_idx and the caller returns that sample on x_in in the
// same cycle (an asynchronous read of the caller's input buffer). The sample
// is broadcast to the 32 hidden MACs while ROM1 supplies the matching block
// of 32 weights. After 17 cycles the 32 hidden sums are scaled to a ROM3
// address (arithmetic shift by ACT_SHIFT, saturated to a signed 8-bit value,
// offset by 128) and all of them are activated in one cycle. The 32-to-1
// multiplexer then feeds the activated values one per cycle to the 4 output
// MACs, weighted from ROM2, which need 33 cycles. Finally the maximum block
// turns the four sums into the 2-bit code of the recognised shape.
//
// Blocks, sizes and cycle counts follow the published architecture; the
// input handshake, number formats and hidden-sum scaling are this
// implementation's choices (see nn_pkg).
//
// Interface: start (accepted when idle), in_idx / x_in (serial input fetch),
// busy, done (one-cycle pulse with result), shape (2-bit result), score[k]
// (final sum of output neuron k, held until the next start).
// Timing: done comes nn_pkg::LATENCY+1 cycles after the start cycle.
module nn_core
  import nn_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  output logic [$clog2(N_IN)-1:0] in_idx,
  input  x_t                     x_in,
  output logic                   busy,
  output logic                   done,
  output shape_e                 shape,
  output acc2_t                  score [N_OUT]
);

  // control
  logic                     l1_rst, l1_ce, in_valid, act_en;
  logic                     l2_rst, l2_ce, max_en;
  logic [$clog2(N_HID):0]   sel;
  logic [$clog2(N_HID)-1:0] rom2_blk;

  nn_controller u_ctrl (
    .clk, .rst_n, .start, .busy,
    .l1_rst, .l1_ce, .in_idx, .in_valid,
    .act_en,
    .l2_rst, .l2_ce, .sel, .rom2_blk,
    .max_en
  );

  // hidden layer
  w1_t   w1   [N_HID];
  acc1_t acc1 [N_HID];
  x_t    x_l1;

  assign x_l1 = in_valid ? x_in : '0;

  rom1_weights #(.N_BLK(N_IN), .BLK_SIZE(N_HID), .W_W(W1_W)) u_rom1 (
    .blk (in_idx),
    .w   (w1)
  );

  mac_layer #(.N(N_HID), .IN_W(X_W), .W_W(W1_W), .ACC_W(ACC1_W),
              .BIAS(nn_tables_pkg::bias1_init())) u_hidden (
    .clk, .rst(l1_rst), .ce(l1_ce), .x(x_l1), .w(w1), .acc(acc1)
  );

  // activation: scale, saturate, look up
  localparam int signed ACT_MAX = 2**(ACT_AW-1) - 1;
  localparam int signed ACT_MIN = -(2**(ACT_AW-1));

  logic [ACT_AW-1:0] act_addr [N_HID];
  act_t              act      [N_HID];

  always_comb begin
    for (int i = 0; i < N_HID; i++) begin
      acc1_t z;
      z = acc1[i] >>> ACT_SHIFT;
      if (z > acc1_t'(ACT_MAX))      act_addr[i] = ACT_AW'(ACT_MAX + 2**(ACT_AW-1));
      else if (z < acc1_t'(ACT_MIN)) act_addr[i] = '0;
      else                           act_addr[i] = ACT_AW'(z) ^ (ACT_AW'(1) << (ACT_AW-1));
    end
  end

  rom3_tansig #(.N_PORTS(N_HID), .A_W(ACT_AW), .D_W(ACT_W)) u_rom3 (
    .clk, .en(act_en), .addr(act_addr), .dout(act)
  );

  // output layer
  act_t  x_l2;
  w2_t   w2   [N_OUT];

  hidden_mux #(.N(N_HID), .W(ACT_W)) u_mux (
    .din (act), .sel (sel), .dout (x_l2)
  );

  rom2_weights #(.N_BLK(N_HID), .BLK_SIZE(N_OUT), .W_W(W2_W),
                 .CONTENTS(nn_tables_pkg::rom2_init())) u_rom2 (
    .blk (rom2_blk),
    .w   (w2)
  );

  mac_layer #(.N(N_OUT), .IN_W(ACT_W), .W_W(W2_W), .ACC_W(ACC2_W),
              .BIAS(nn_tables_pkg::bias2_init())) u_output (
    .clk, .rst(l2_rst), .ce(l2_ce), .x(x_l2), .w(w2), .acc(score)
  );

  // maximum
  logic [CLASS_W-1:0] idx;

  max_finder #(.N(N_OUT), .W(ACC2_W)) u_max (
    .clk, .rst_n, .en(max_en), .din(score), .idx, .valid(done)
  );

  assign shape = shape_e'(idx);

endmodule
