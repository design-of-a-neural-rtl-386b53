// tb_rom3_tansig: checks every entry of the activation ROM against
// round(127*tanh((i-128)/32)) computed with real arithmetic, through all 32
// read ports at once, and that the outputs are registered: they change only
// on an enabled clock edge.
module tb_rom3_tansig;
  import nn_ref_pkg::*;
  logic clk = 0, en;
  logic [7:0]        addr [32];
  logic signed [7:0] dout [32];
  int checks = 0, failures = 0;

  rom3_tansig dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [7:0] old [32];
    en = 0;
    for (int base = 0; base < 256; base += 32) begin
      foreach (addr[p]) addr[p] = 8'(base + ((p * 7) % 32));
      @(negedge clk) en = 1;
      @(negedge clk) en = 0;
      foreach (addr[p]) begin
        checks++;
        if (int'(dout[p]) != tansig(int'(addr[p]) - 128)) begin
          failures++;
          $display("FAIL addr %0d: %0d exp %0d", addr[p], dout[p], tansig(int'(addr[p]) - 128));
        end
      end
      // a disabled edge must hold the outputs
      old = dout;
      foreach (addr[p]) addr[p] = ~addr[p];
      @(negedge clk);
      checks++;
      if (dout != old) begin
        failures++; $display("FAIL outputs changed without en");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
