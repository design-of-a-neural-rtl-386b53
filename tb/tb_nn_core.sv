// tb_nn_core: runs complete classifications through the network core and
// compares the four output sums and the shape code with the integer
// reference model (real tanh in place of the activation ROM). It also checks
// the latency: done must come exactly 54 cycles after the start cycle
// (53 busy cycles plus the registered result), and counts how many hidden
// sums ran past the range of the activation table (saturation).
module tb_nn_core;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  logic clk = 0, rst_n, start, busy, done;
  logic [3:0] in_idx;
  x_t x_in;
  shape_e shape;
  acc2_t score [N_OUT];
  x_t vec [N_IN];
  int checks = 0, failures = 0;

  nn_core dut (.*);

  assign x_in = vec[in_idx];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi [16], y [4], exp_shape, n_sat, sat_total, cyc;
    int shape_seen [4];
    load();
    sat_total = 0;
    foreach (shape_seen[k]) shape_seen[k] = 0;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    start = 0;
    foreach (vec[i]) vec[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 16; i++) begin
        // small, medium and full-scale samples
        case (t % 3)
          0: xi[i] = $urandom_range(0, 15) - 8;
          1: xi[i] = $urandom_range(0, 63) - 32;
          default: xi[i] = $urandom_range(0, 255) - 128;
        endcase
        vec[i] = x_t'(xi[i]);
      end
      exp_shape = classify(xi, y, n_sat);
      sat_total += n_sat;
      shape_seen[exp_shape]++;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cyc = 1;
      while (!done && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != LATENCY + 1) begin
        failures++; $display("FAIL latency %0d exp %0d", cyc, LATENCY + 1);
      end
      checks++;
      if (int'(shape) != exp_shape) begin
        failures++; $display("FAIL t=%0d shape %0d exp %0d", t, shape, exp_shape);
      end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(score[k]) != y[k]) begin
          failures++; $display("FAIL t=%0d score%0d %0d exp %0d", t, k, score[k], y[k]);
        end
      end
    end
    checks++;
    if (sat_total == 0) begin
      failures++; $display("FAIL activation saturation never exercised");
    end
    for (int k = 0; k < 4; k++) $display("shape %0d chosen %0d times", k, shape_seen[k]);
    $display("saturated hidden sums: %0d", sat_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
