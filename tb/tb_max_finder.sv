// tb_max_finder: random and tied signed sums; the registered index must be
// the first largest one, valid must pulse exactly one cycle after en, and
// the index must hold when en is low.
module tb_max_finder;
  localparam int N = 4, W = 22;
  logic clk = 0, rst_n, en;
  logic signed [W-1:0] din [N];
  logic [1:0] idx;
  logic valid;
  int checks = 0, failures = 0, ties = 0;

  max_finder #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    logic [1:0] held;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    en = 0;
    foreach (din[i]) din[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      foreach (din[i]) din[i] = W'($urandom);
      if (t % 4 == 0) din[$urandom_range(1, 3)] = din[0];           // tie
      if (t % 8 == 1) foreach (din[i]) din[i] = -W'($urandom_range(1, 50));
      best = 0;
      for (int i = 1; i < N; i++) if (din[i] > din[best]) best = i;
      for (int i = 0; i < N; i++) if (i != best && din[i] == din[best]) ties++;
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (!valid || idx != 2'(best)) begin
        failures++; $display("FAIL t=%0d idx %0d exp %0d valid %0b", t, idx, best, valid);
      end
      held = idx;
      foreach (din[i]) din[i] = W'($urandom);
      @(negedge clk);
      checks++;
      if (valid || idx != held) begin
        failures++; $display("FAIL hold t=%0d", t);
      end
    end
    checks++;
    if (ties == 0) begin
      failures++; $display("FAIL no tie exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
