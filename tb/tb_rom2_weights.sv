// tb_rom2_weights: checks that block b of ROM2 returns words b*4..b*4+3 of
// the output-layer weight table, sign-extended, for every block.
module tb_rom2_weights;
  import nn_ref_pkg::*;
  logic [4:0]        blk;
  logic signed [7:0] w [4];
  int checks = 0, failures = 0;

  rom2_weights dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load();
    for (int b = 0; b < 32; b++) begin
      blk = 5'(b);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(w[k]) != w2[b*4 + k]) begin
          failures++; $display("FAIL blk %0d word %0d: %0d exp %0d", b, k, w[k], w2[b*4+k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
