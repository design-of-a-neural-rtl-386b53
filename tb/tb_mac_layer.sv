// tb_mac_layer: checks the hidden-layer configuration (32 neurons) of
// mac_layer. Each neuron must start from its own bias from the bias table
// and, after 16 inputs plus one drain cycle, hold bias + sum of x*w with its
// own weights.
module tb_mac_layer;
  import nn_ref_pkg::*;
  localparam int N = 32, IN_W = 8, W_W = 12, ACC_W = 25;
  logic clk = 0, rst, ce;
  logic signed [IN_W-1:0]  x;
  logic signed [W_W-1:0]   w   [N];
  logic signed [ACC_W-1:0] acc [N];
  int checks = 0, failures = 0;

  mac_layer #(.N(N), .IN_W(IN_W), .W_W(W_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp [N];
    load();
    rst = 0; ce = 0; x = 0;
    foreach (w[j]) w[j] = 0;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk) rst = 1;
      @(negedge clk) rst = 0;
      for (int j = 0; j < N; j++) begin
        exp[j] = b1[j];
        checks++;
        if (acc[j] !== ACC_W'(b1[j])) begin
          failures++; $display("FAIL bias %0d: %0d exp %0d", j, acc[j], b1[j]);
        end
      end
      for (int i = 0; i <= 16; i++) begin
        x = (i < 16) ? IN_W'($urandom) : '0;
        for (int j = 0; j < N; j++) begin
          w[j] = W_W'($urandom);
          exp[j] += longint'(x) * longint'(w[j]);
        end
        ce = 1;
        @(negedge clk);
      end
      ce = 0;
      for (int j = 0; j < N; j++) begin
        checks++;
        if (acc[j] !== ACC_W'(exp[j])) begin
          failures++; $display("FAIL neuron %0d: %0d exp %0d", j, acc[j], exp[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
