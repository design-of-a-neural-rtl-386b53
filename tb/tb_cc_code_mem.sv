// tb_cc_code_mem: fills the 1024 x 2-bit store with random codes, some
// writes with we low that must not land, and checks every entry through
// the single-code port and every 32-bit word through the packed port.
module tb_cc_code_mem;
  logic clk = 0, we;
  logic [9:0] waddr, raddr;
  logic [1:0] wdata, rdata;
  logic [5:0] word_addr;
  logic [31:0] word_data;
  logic [1:0] model [1024];
  int checks = 0, failures = 0;

  cc_code_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0; word_addr = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk);
        we = (pass == 0) || ($urandom_range(0, 2) != 0);
        waddr = 10'(i); wdata = 2'($urandom);
        if (we) model[i] = wdata;
      end
      @(negedge clk) we = 0;
      for (int i = 0; i < 1024; i++) begin
        raddr = 10'(i); #1;
        checks++;
        if (rdata !== model[i]) begin
          failures++; $display("FAIL code %0d = %0d exp %0d", i, rdata, model[i]);
        end
      end
      for (int w = 0; w < 64; w++) begin
        logic [31:0] e;
        for (int k = 0; k < 16; k++) e[2*k +: 2] = model[16 * w + k];
        word_addr = 6'(w); #1;
        checks++;
        if (word_data !== e) begin
          failures++; $display("FAIL word %0d = %h exp %h", w, word_data, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
