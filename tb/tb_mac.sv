// tb_mac: checks the pipelined MAC neuron against an integer model.
// For random operand streams of random length K it checks that the bias is
// loaded by rst, that after K enabled cycles only K-1 products have been
// added (one pipeline stage), that after K+1 cycles all K are, and that
// cycles with ce low leave the sum unchanged.
module tb_mac;
  localparam int IN_W = 8, W_W = 12, ACC_W = 25;
  logic clk = 0, rst, ce;
  logic signed [IN_W-1:0]  x;
  logic signed [W_W-1:0]   w;
  logic signed [ACC_W-1:0] offset, acc;
  int checks = 0, failures = 0;

  mac #(.IN_W(IN_W), .W_W(W_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(longint exp, string what);
    checks++;
    if (acc !== ACC_W'(exp)) begin
      failures++;
      $display("FAIL %s: acc=%0d exp=%0d", what, acc, exp);
    end
  endtask

  initial begin
    longint acc_exp, pend, full;
    int k;
    rst = 0; ce = 0; x = 0; w = 0; offset = 0;
    for (int t = 0; t < 200; t++) begin
      k = 1 + $urandom_range(0, 31);
      offset = ACC_W'($signed($urandom_range(0, 65535)) - 32768);
      @(negedge clk) rst = 1;
      @(negedge clk) rst = 0;
      check(offset, "bias load");
      acc_exp = offset; pend = 0; full = offset;
      for (int i = 0; i <= k; i++) begin
        if (i < k) begin
          x = IN_W'($urandom); w = W_W'($urandom);
        end else begin
          x = 0; w = 0;
        end
        full += longint'(x) * longint'(w);
        ce = 1;
        @(negedge clk);
        // the product registered in the previous enabled cycle is added now
        acc_exp += pend;
        pend = longint'(x) * longint'(w);
        check(acc_exp, "pipeline");
        if ($urandom_range(0, 3) == 0) begin
          ce = 0; x = IN_W'($urandom); w = W_W'($urandom);
          @(negedge clk);
          check(acc_exp, "hold");
        end
      end
      ce = 0;
      // after K+1 enabled cycles all K products are in
      check(full, "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
