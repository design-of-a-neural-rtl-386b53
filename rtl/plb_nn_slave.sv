// plb_nn_slave: processor-bus slave through which the embedded processor
// drives the neural network.
//
// The processor writes the 16 input samples one after another to the DATA
// register; they are kept in a 16-entry input buffer which the network core
// reads serially. The 16th write starts a classification. While the core is
// running, further DATA writes are held off by withholding the acknowledge
// (bus wait states), so the buffer cannot change under the core. The 2-bit
// result goes back to the processor through the STATUS register, and the four
// output-neuron sums can be read from SCORE0..3.
//
// Register map (byte offsets from BASEADDR, 32-bit words):
//   0x00 DATA    W  bits [7:0]: next input sample (signed)
//   0x04 STATUS  R  [0] done (result valid, cleared by the next DATA write)
//                   [1] busy, [5:4] shape code, [12:8] samples buffered
//   0x08 CONTROL W  [0] = 1: discard a partly written input vector
//   0x10..0x1C SCORE0..3 R  sum of output neuron k, sign-extended
//   other offsets below SPAN read as 0 and ignore writes.
//
// Bus side: a simplified single-beat slave in the style of the Processor
// Local Bus. A master holds pavalid with rnw, abus and wrdbus until addrack;
// the slave answers one or more cycles later with addrack together with
// wrdack (write) or rddack (read) for exactly one cycle. rddbus is zero
// whenever rddack is low, so the read-data buses of several slaves can be
// ORed together as in a shared PLB. Using the PLB, sending the 16 inputs
// serially over it and returning the 2-bit code over it follow the
// published system; arbitration, bursts and the full PLB signal set are
// left to the bus and are not modelled; the register map and wait-state
// behaviour are this implementation's choices.
module plb_nn_slave
  import nn_pkg::*;
#(
  parameter logic [31:0] BASEADDR = 32'h8000_0000,
  parameter int unsigned SPAN     = 256
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bus
  input  logic                    plb_pavalid,
  input  logic                    plb_rnw,
  input  logic [31:0]             plb_abus,
  input  logic [31:0]             plb_wrdbus,
  output logic                    sl_addrack,
  output logic                    sl_wrdack,
  output logic                    sl_rddack,
  output logic [31:0]             sl_rddbus,
  // network core
  output logic                    core_start,
  input  logic [$clog2(N_IN)-1:0] core_in_idx,
  output x_t                      core_x,
  input  logic                    core_busy,
  input  logic                    core_done,
  input  shape_e                  core_shape,
  input  acc2_t                   core_score [N_OUT]
);

  localparam logic [7:0] OFF_DATA   = 8'h00;
  localparam logic [7:0] OFF_STATUS = 8'h04;
  localparam logic [7:0] OFF_CTRL   = 8'h08;
  localparam logic [7:0] OFF_SCORE  = 8'h10;

  x_t                  in_buf [N_IN];
  logic [4:0]          n_buf;       // samples written so far
  logic                done_flag;
  logic                ack_q, rnw_q;
  logic [31:0]         rdata_q;

  // address decode
  logic [31:0] offset;
  logic        hit, is_data_wr, stall, take;

  assign offset     = plb_abus - BASEADDR;
  assign hit        = plb_pavalid && (plb_abus >= BASEADDR) && (offset < SPAN);
  assign is_data_wr = !plb_rnw && (offset[7:0] == OFF_DATA);
  assign stall      = is_data_wr && (core_busy || core_start);
  assign take       = hit && !ack_q && !stall;

  function automatic logic [31:0] read_reg(input logic [7:0] off);
    logic [31:0] r;
    logic [7:0]  k;
    r = '0;
    k = (off - OFF_SCORE) >> 2;
    if (off == OFF_STATUS) begin
      r[0]    = done_flag;
      r[1]    = core_busy || core_start;
      r[5:4]  = core_shape;
      r[12:8] = n_buf;
    end else if (off >= OFF_SCORE && off < OFF_SCORE + 8'(4 * N_OUT) && off[1:0] == 2'b00) begin
      r = 32'(core_score[k[$clog2(N_OUT)-1:0]]);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q      <= 1'b0;
      rnw_q      <= 1'b0;
      rdata_q    <= '0;
      n_buf      <= '0;
      done_flag  <= 1'b0;
      core_start <= 1'b0;
      for (int i = 0; i < N_IN; i++) in_buf[i] <= '0;
    end else begin
      ack_q      <= take;
      core_start <= 1'b0;
      if (core_done) done_flag <= 1'b1;
      if (take) begin
        rnw_q <= plb_rnw;
        if (plb_rnw) begin
          rdata_q <= read_reg(offset[7:0]);
        end else if (offset[7:0] == OFF_DATA) begin
          in_buf[n_buf[3:0]] <= x_t'(plb_wrdbus[X_W-1:0]);
          done_flag          <= 1'b0;
          if (n_buf == 5'(N_IN - 1)) begin
            n_buf      <= '0;
            core_start <= 1'b1;
          end else begin
            n_buf <= n_buf + 5'd1;
          end
        end else if (offset[7:0] == OFF_CTRL && plb_wrdbus[0]) begin
          n_buf <= '0;
        end
      end
    end
  end

  assign sl_addrack = ack_q;
  assign sl_wrdack  = ack_q && !rnw_q;
  assign sl_rddack  = ack_q && rnw_q;
  assign sl_rddbus  = sl_rddack ? rdata_q : '0;

  assign core_x = in_buf[core_in_idx];

  // bus rules
  a_ack_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
                                    sl_addrack |=> !sl_addrack);
  a_rd_zero:       assert property (@(posedge clk) disable iff (!rst_n)
                                    !sl_rddack |-> (sl_rddbus == '0));
  a_buf_stable:    assert property (@(posedge clk) disable iff (!rst_n)
                                    core_busy |-> !(take && is_data_wr));

endmodule
