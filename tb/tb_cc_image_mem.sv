// tb_cc_image_mem: writes random words to every address in random order,
// keeps a model image, and reads every row (and out-of-range rows, which
// must be zero) through both ports after each batch of writes.
module tb_cc_image_mem;
  logic clk = 0, we;
  logic [6:0] waddr;
  logic [31:0] wdata;
  logic [7:0] ra, rb;
  logic [63:0] row_a, row_b;
  logic [63:0] model [64];
  int checks = 0, failures = 0;

  cc_image_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    for (int r = 0; r < 130; r++) begin
      ra = 8'(r); rb = 8'(129 - r);
      #1;
      checks += 2;
      if (row_a !== ((r < 64) ? model[r] : 64'b0)) begin
        failures++; $display("FAIL row %0d port a %h", r, row_a);
      end
      if (row_b !== ((129 - r < 64) ? model[129 - r] : 64'b0)) begin
        failures++; $display("FAIL row %0d port b %h", 129 - r, row_b);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; ra = 0; rb = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk) we = 1; waddr = 7'(i); wdata = 0;
    end
    @(negedge clk) we = 0;
    foreach (model[i]) model[i] = 0;
    for (int pass = 0; pass < 6; pass++) begin
      for (int i = 0; i < 200; i++) begin
        int a = $urandom_range(0, 127);
        @(negedge clk);
        we = $urandom_range(0, 3) != 0; waddr = 7'(a); wdata = $urandom;
        if (we) model[a / 2][32 * (a % 2) +: 32] = wdata;
      end
      @(negedge clk) we = 0;
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
