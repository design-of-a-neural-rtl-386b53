// tb_slope_normalizer: feeds random code sequences of random length (also
// shorter than 16, with empty pieces, and up to the full 1024) and straight
// runs that hit the sector boundaries exactly (0, 45, 90 ... degrees); the
// 16 slope codes must match the model, which quantises the angle from
// atan2. Also checks the L+16 cycle count.
module tb_slope_normalizer;
  import cc_ref_pkg::*;
  logic clk = 0, rst_n, start, busy, done;
  logic [10:0] len;
  logic [9:0] raddr;
  logic [1:0] rdata;
  logic [3:0] slope [16];
  logic [1:0] mem [1024];
  int checks = 0, failures = 0;

  slope_normalizer dut (.*);

  assign rdata = mem[raddr];

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int codes [$]);
    int s [16], cyc;
    foreach (codes[i]) mem[i] = 2'(codes[i]);
    slopes(codes, s);
    len = 11'(codes.size());
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 3000) begin
      @(negedge clk); cyc++;
    end
    checks++;
    if (cyc != codes.size() + 17) begin
      failures++; $display("FAIL cycles %0d for L=%0d", cyc, codes.size());
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (int'(slope[k]) != s[k]) begin
        failures++; $display("FAIL L=%0d piece %0d: %0d exp %0d", codes.size(), k, slope[k], s[k]);
      end
    end
  endtask

  initial begin
    int c [$];
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    start = 0; len = 0;
    foreach (mem[i]) mem[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // boundary directions: each piece a straight or exactly diagonal run
    for (int d = 0; d < 8; d++) begin
      c = {};
      for (int k = 0; k < 16; k++)
        for (int j = 0; j < 4; j++)
          c.push_back((d % 2 == 0) ? d / 2 : ((j % 2 == 0) ? d / 2 : (d / 2 + 1) % 4));
      run(c);
    end
    // random walks with a bias, various lengths
    for (int t = 0; t < 150; t++) begin
      int l = (t < 10) ? $urandom_range(1, 15) : $urandom_range(16, 1024);
      int bias = $urandom_range(0, 3);
      c = {};
      for (int i = 0; i < l; i++)
        c.push_back(($urandom_range(0, 2) == 0) ? $urandom_range(0, 3) : (bias + (i / 37)) % 4);
      run(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
