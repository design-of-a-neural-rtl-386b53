// tb_nn_controller: records the control strobes of complete runs and checks
// the published phase lengths: one bias-load cycle, 17 hidden-layer cycles
// with inputs 0..15 then a drain cycle, one activation cycle, 33 output-layer
// cycles with selects 0..32, one maximum cycle: 53 busy cycles in all. A start
// pulse during a run must be ignored.
module tb_nn_controller;
  logic clk = 0, rst_n, start, busy;
  logic l1_rst, l1_ce, in_valid, act_en, l2_rst, l2_ce, max_en;
  logic [3:0] in_idx;
  logic [5:0] sel;
  logic [4:0] rom2_blk;
  int checks = 0, failures = 0;

  nn_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0d exp %0d", what, got, exp);
    end
  endtask

  // expected strobe pattern for busy cycle c (0-based)
  initial begin
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      int c;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      c = 0;
      while (busy) begin
        // phase boundaries: 0 load, 1..17 L1, 18 act, 19..51 L2, 52 max
        expect_eq(int'(l1_rst), int'(c == 0), "l1_rst");
        expect_eq(int'(l2_rst), int'(c == 0), "l2_rst");
        expect_eq(int'(l1_ce), int'(c >= 1 && c <= 17), "l1_ce");
        if (c >= 1 && c <= 17) begin
          expect_eq(int'(in_valid), int'(c <= 16), "in_valid");
          if (c <= 16) expect_eq(int'(in_idx), c - 1, "in_idx");
        end else begin
          expect_eq(int'(in_valid), 0, "in_valid idle");
        end
        expect_eq(int'(act_en), int'(c == 18), "act_en");
        expect_eq(int'(l2_ce), int'(c >= 19 && c <= 51), "l2_ce");
        if (c >= 19 && c <= 51) begin
          expect_eq(int'(sel), c - 19, "sel");
          if (c <= 50) expect_eq(int'(rom2_blk), c - 19, "rom2_blk");
        end
        expect_eq(int'(max_en), int'(c == 52), "max_en");
        if (run == 1 && c == 30) start = 1;   // must be ignored
        @(negedge clk);
        start = 0;
        c++;
      end
      expect_eq(c, 53, "busy cycles");
      repeat (3) @(negedge clk);
      expect_eq(int'(busy), 0, "stays idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
