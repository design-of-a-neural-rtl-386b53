// tb_plb_nn_slave: exercises the bus slave against a simple stand-in for the
// network core (busy for a fixed time after start, then a done pulse with a
// chosen shape and scores). Checks: the 16 written samples reach the input
// buffer in order and start the core exactly once; DATA writes during a run
// get wait states instead of an acknowledge; STATUS and SCORE reads; CONTROL
// discards a partial vector; unmapped offsets read 0; addresses outside the
// slave are never acknowledged; read data is 0 outside rddack.
module tb_plb_nn_slave;
  import nn_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  logic clk = 0, rst_n;
  logic plb_pavalid, plb_rnw, sl_addrack, sl_wrdack, sl_rddack;
  logic [31:0] plb_abus, plb_wrdbus, sl_rddbus;
  logic core_start, core_busy, core_done;
  logic [3:0] core_in_idx;
  x_t core_x;
  shape_e core_shape;
  acc2_t core_score [N_OUT];
  int checks = 0, failures = 0, n_starts = 0, wait_total = 0;

  plb_nn_slave #(.BASEADDR(BASE)) dut (.*);

  always #5 clk = ~clk;

  // core stand-in: busy for 20 cycles
  int busy_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt <= 0; core_done <= 0;
    end else begin
      core_done <= 0;
      if (core_start) begin
        busy_cnt <= 20; n_starts <= n_starts + 1;
      end else if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) core_done <= 1;
      end
    end
  end
  assign core_busy = busy_cnt > 0;

  always @(negedge clk) if (!sl_rddack) begin
    checks++;
    if (sl_rddbus != 0) begin
      failures++; $display("FAIL rddbus not zero outside rddack");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0h exp %0h", what, got, exp);
    end
  endtask

  // returns the number of cycles spent waiting for addrack; -1 if none came
  task automatic bus(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int waits);
    waits = 0;
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d;
    @(posedge clk);
    #1;
    while (!sl_addrack && waits < 100) begin
      @(posedge clk); #1; waits++;
    end
    if (!sl_addrack) waits = -1;
    else begin
      checks++;
      if (rnw ? !(sl_rddack && !sl_wrdack) : !(sl_wrdack && !sl_rddack)) begin
        failures++; $display("FAIL data ack type");
      end
    end
    rd = sl_rddbus;
    @(negedge clk);
    plb_pavalid = 0;
  endtask

  initial begin
    logic [31:0] rd;
    int waits;
    x_t exp_vec [16];
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    plb_pavalid = 0; plb_rnw = 0; plb_abus = 0; plb_wrdbus = 0;
    core_in_idx = 0; core_shape = SHAPE_RECTANGLE;
    foreach (core_score[k]) core_score[k] = acc2_t'(-1000 * (k + 1));
    repeat (2) @(negedge clk);
    rst_n = 1;
    // partial vector then discard
    for (int i = 0; i < 5; i++) bus(0, BASE, 32'h77, rd, waits);
    bus(1, BASE + 4, 0, rd, waits);
    expect_eq(rd[12:8], 5, "samples buffered");
    bus(0, BASE + 8, 1, rd, waits);
    bus(1, BASE + 4, 0, rd, waits);
    expect_eq(rd[12:8], 0, "discarded");
    for (int run = 0; run < 3; run++) begin
      // part A: a DATA write while the core runs gets wait states
      for (int i = 0; i < 16; i++) bus(0, BASE, 32'(i), rd, waits);
      bus(0, BASE, 32'h00000011, rd, waits);
      checks++;
      if (waits <= 0) begin
        failures++; $display("FAIL DATA write during run not stalled");
      end
      wait_total += (waits > 0) ? waits : 0;
      // the held write became the first sample of a new vector
      bus(1, BASE + 4, 0, rd, waits);
      expect_eq(rd[0], 0, "done cleared by new sample");
      expect_eq(rd[1], 0, "not busy");
      expect_eq(rd[12:8], 1, "count after stalled write");
      core_in_idx = 0;
      #1 expect_eq(core_x, 8'sh11, "held write stored after the run");
      bus(0, BASE + 8, 1, rd, waits);
      // part B: full vector, wait for the result
      for (int i = 0; i < 16; i++) begin
        exp_vec[i] = x_t'($urandom);
        bus(0, BASE, {24'hABCDEF, exp_vec[i]}, rd, waits);
        expect_eq(waits, 0, "no wait when idle");
      end
      bus(1, BASE + 4, 0, rd, waits);
      expect_eq(rd[1], 1, "busy");
      expect_eq(rd[0], 0, "not done yet");
      repeat (30) @(negedge clk);
      bus(1, BASE + 4, 0, rd, waits);
      expect_eq(rd[0], 1, "done flag");
      expect_eq(rd[1], 0, "idle again");
      expect_eq(rd[5:4], SHAPE_RECTANGLE, "shape");
      for (int i = 0; i < 16; i++) begin
        core_in_idx = 4'(i);
        #1;
        expect_eq(core_x, exp_vec[i], "input buffer");
      end
      for (int k = 0; k < 4; k++) begin
        logic [31:0] e;
        e = 32'(core_score[k]);
        bus(1, BASE + 32'h10 + 4 * k, 0, rd, waits);
        expect_eq(rd, e, "score");
      end
    end
    expect_eq(n_starts, 6, "starts");
    bus(1, BASE + 32'h40, 0, rd, waits);
    expect_eq(rd, 0, "unmapped read");
    expect_eq(waits, 0, "unmapped acked");
    bus(1, BASE + 32'h1000, 0, rd, waits);
    expect_eq(waits, -1, "foreign address not acked");
    $display("DATA-write wait states observed: %0d", wait_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
