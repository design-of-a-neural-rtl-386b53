// nn_controller: sequences one classification through the network.
//
// Built around a six-bit counter, it generates every control signal of the
// datapath: the MAC reset (bias load) and enable of each layer, the block
// address of ROM1 and ROM2, the enable of the activation ROM, the select of
// the hidden-output multiplexer and the enable of the maximum block. One
// classification walks through these phases:
//
//   LOAD  1 cycle          both layers load their biases
//   L1    N_IN+1 cycles    input cnt and ROM1 block cnt enter the hidden
//                          layer (cnt = N_IN only drains the MAC pipeline)
//   ACT   1 cycle          all hidden sums are looked up in ROM3 at once
//   L2    N_HID+1 cycles   hidden output cnt and ROM2 block cnt enter the
//                          output layer (cnt = N_HID drains the pipeline)
//   MAX   1 cycle          the largest output sum is selected
//
// 1 + 17 + 1 + 33 + 1 = 53 busy cycles for the published 16-32-4 network.
// The phase lengths of the two layers (17 and 33 cycles), the single-cycle
// activation and maximum and the six-bit counter follow the published
// design; the separate bias-load cycle and the state encoding are this
// implementation's choices.
//
// Interface: start (accepted when idle), busy (high while sequencing),
// cnt-derived addresses in_idx / in_valid / sel, and per-phase strobes.
// Timing: all outputs are decoded from the registered state and counter.
module nn_controller
  import nn_pkg::*;
#(
  parameter int unsigned NI = N_IN,
  parameter int unsigned NH = N_HID
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  // hidden layer
  output logic                  l1_rst,
  output logic                  l1_ce,
  output logic [$clog2(NI)-1:0] in_idx,    // input index = ROM1 block
  output logic                  in_valid,  // 0 in the drain cycle
  // activation
  output logic                  act_en,
  // output layer
  output logic                  l2_rst,
  output logic                  l2_ce,
  output logic [$clog2(NH):0]   sel,       // mux select; NH in the drain cycle
  output logic [$clog2(NH)-1:0] rom2_blk,
  // maximum
  output logic                  max_en
);

  nn_state_e  state;
  logic [5:0] cnt;   // the six-bit control counter

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) state <= ST_LOAD;
        ST_LOAD: begin
          state <= ST_L1;
          cnt   <= '0;
        end
        ST_L1: begin
          if (cnt == 6'(NI)) begin
            state <= ST_ACT;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 6'd1;
          end
        end
        ST_ACT: begin
          state <= ST_L2;
          cnt   <= '0;
        end
        ST_L2: begin
          if (cnt == 6'(NH)) begin
            state <= ST_MAX;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 6'd1;
          end
        end
        ST_MAX:  state <= ST_IDLE;
        default: state <= ST_IDLE;
      endcase
    end
  end

  always_comb begin
    busy     = (state != ST_IDLE);
    l1_rst   = (state == ST_LOAD);
    l2_rst   = (state == ST_LOAD);
    l1_ce    = (state == ST_L1);
    in_idx   = cnt[$clog2(NI)-1:0];
    in_valid = (state == ST_L1) && (cnt < 6'(NI));
    act_en   = (state == ST_ACT);
    l2_ce    = (state == ST_L2);
    sel      = ($clog2(NH)+1)'(cnt);
    rom2_blk = cnt[$clog2(NH)-1:0];
    max_en   = (state == ST_MAX);
  end

  // The counter must never run past the longest phase.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n)
                                cnt <= 6'(NH));
  // A new start is never taken while a classification is running.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 (busy && start) |=> (state != ST_LOAD));

endmodule
