// tb_hidden_mux: drives 32 random values and checks that every select value
// 0..31 returns the matching input and that the drain select 32 returns 0.
module tb_hidden_mux;
  logic signed [7:0] din [32];
  logic [5:0]        sel;
  logic signed [7:0] dout;
  int checks = 0, failures = 0;

  hidden_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      foreach (din[i]) din[i] = 8'($urandom);
      for (int s = 0; s <= 32; s++) begin
        sel = 6'(s);
        #1;
        checks++;
        if (dout !== ((s < 32) ? din[s] : 8'sd0)) begin
          failures++; $display("FAIL sel %0d: %0d", s, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
