// tb_rom1_weights: checks that block b of ROM1 returns words b*32..b*32+31
// of the weight table, sign-extended, for every block.
module tb_rom1_weights;
  import nn_ref_pkg::*;
  logic [3:0]         blk;
  logic signed [11:0] w [32];
  int checks = 0, failures = 0;

  rom1_weights dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load();
    for (int b = 15; b >= 0; b--) begin
      blk = 4'(b);
      #1;
      for (int k = 0; k < 32; k++) begin
        checks++;
        if (int'(w[k]) != w1[b*32 + k]) begin
          failures++; $display("FAIL blk %0d word %0d: %0d exp %0d", b, k, w[k], w1[b*32+k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
