// tb_plb_cc_slave: bus slave of the chain-code unit against a stand-in core
// (busy for 30 cycles after each start, then a done pulse, with random
// result values chosen at every start). Checks image writes reach the image
// port with the right word index and data, IMAGE writes during a run are
// held off until the run ends, a start during a run is ignored, the STATUS,
// ORIGIN, SLOPE and CODE registers, unmapped offsets reading zero, accesses
// outside the window getting no acknowledge, and the one-cycle acknowledge.
module tb_plb_cc_slave;
  logic clk = 0, rst_n;
  logic plb_pavalid, plb_rnw;
  logic [31:0] plb_abus, plb_wrdbus;
  logic sl_addrack, sl_wrdack, sl_rddack;
  logic [31:0] sl_rddbus;
  logic img_we, core_start, core_busy, core_done, core_no_object, core_overflow;
  logic [6:0] img_waddr;
  logic [31:0] img_wdata;
  logic [10:0] core_len;
  logic [6:0] core_org_x, core_org_y;
  logic [3:0] core_slope [16];
  logic [5:0] code_word_addr;
  logic [31:0] code_word;
  localparam logic [31:0] BASE = 32'h8001_0000;
  int checks = 0, failures = 0, cycle = 0, starts = 0, stalled = 0;
  int busy_cnt = 0;
  logic [31:0] img_model [128], img_seen [128];

  plb_cc_slave dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in core
  assign core_busy = busy_cnt != 0;
  assign code_word = {code_word_addr, 2'b10, ~code_word_addr, 18'h2a5c3};
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      core_done <= 0;
      busy_cnt <= 0;
    end else begin
      core_done <= 0;
      if (core_start) begin
        starts++;
        busy_cnt <= 30;
        core_len <= 11'($urandom);
        core_org_x <= 7'($urandom); core_org_y <= 7'($urandom);
        core_no_object <= 1'($urandom); core_overflow <= 1'($urandom);
        foreach (core_slope[k]) core_slope[k] <= 4'($urandom);
      end else if (busy_cnt != 0) begin
        busy_cnt <= busy_cnt - 1;
        if (busy_cnt == 1) core_done <= 1;
      end
      if (img_we) img_seen[img_waddr] <= img_wdata;
    end
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic bus(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int waits);
    waits = 0;
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d;
    @(posedge clk); #1;
    while (!sl_addrack && waits < 100) begin
      @(posedge clk); #1; waits++;
    end
    if (!sl_addrack) waits = -1;
    else begin
      checks++;
      if (sl_wrdack !== !rnw || sl_rddack !== rnw) begin
        failures++; $display("FAIL ack kind at %h", a);
      end
    end
    rd = sl_rddbus;
    @(negedge clk);
    plb_pavalid = 0;
    @(posedge clk); #1;
    checks++;
    if (sl_addrack) begin failures++; $display("FAIL ack longer than one cycle"); end
  endtask

  task automatic check_regs();
    logic [31:0] rd;
    int w;
    bus(1, BASE + 32'h804, 0, rd, w);
    expect_eq(rd[3:0], {core_overflow, core_no_object, core_busy, 1'b1}, "status flags");
    expect_eq(rd[26:16], core_len, "status length");
    bus(1, BASE + 32'h808, 0, rd, w);
    expect_eq(rd, {17'b0, core_org_y, 1'b0, core_org_x}, "origin");
    for (int k = 0; k < 16; k++) begin
      bus(1, BASE + 32'h840 + 4 * k, 0, rd, w);
      expect_eq(rd, core_slope[k], $sformatf("slope %0d", k));
    end
    for (int k = 0; k < 64; k += 7) begin
      logic [5:0] a = 6'(k);
      bus(1, BASE + 32'h400 + 4 * k, 0, rd, w);
      expect_eq(rd, {a, 2'b10, ~a, 18'h2a5c3}, $sformatf("code word %0d", k));
    end
  endtask

  initial begin
    logic [31:0] rd;
    int w;
    rst_n = 1; plb_pavalid = 0; plb_rnw = 0; plb_abus = 0; plb_wrdbus = 0;
    #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    repeat (2) @(negedge clk);
    rst_n = 1;

    // image writes while idle: no wait states
    for (int n = 0; n < 128; n++) begin
      img_model[n] = $urandom;
      bus(0, BASE + 4 * n, img_model[n], rd, w);
      expect_eq(w, 0, "idle image write wait states");
    end
    @(negedge clk);
    for (int n = 0; n < 128; n++) expect_eq(img_seen[n], img_model[n], $sformatf("image word %0d", n));

    bus(1, BASE + 32'h804, 0, rd, w);
    expect_eq(rd[1:0], 0, "status idle, not done");

    for (int run = 0; run < 5; run++) begin
      bus(0, BASE + 32'h800, 1, rd, w);
      bus(1, BASE + 32'h804, 0, rd, w);
      expect_eq(rd[1:0], 2'b10, "status busy, done cleared");
      if (run % 2 == 0) begin
        // start during the run: ignored
        bus(0, BASE + 32'h800, 1, rd, w);
        // image write during the run: held off until the end
        img_model[run] = $urandom;
        bus(0, BASE + 4 * run, img_model[run], rd, w);
        checks++;
        if (w < 5 || core_busy) begin
          failures++; $display("FAIL image write not held off (%0d waits)", w);
        end else stalled++;
        @(negedge clk);
        expect_eq(img_seen[run], img_model[run], "held image write lands");
      end
      while (core_busy) @(negedge clk);
      @(negedge clk);
      check_regs();
      expect_eq(starts, run + 1, "one start per run");
    end

    // unmapped offsets inside the window
    for (int i = 0; i < 5; i++) begin
      static logic [31:0] offs [5] = '{32'h200, 32'h500, 32'h80C, 32'h880, 32'hFFC};
      bus(1, BASE + offs[i], 0, rd, w);
      expect_eq(rd, 0, "unmapped read");
      expect_eq(w, 0, "unmapped acknowledged");
    end
    // outside the window
    bus(1, BASE + 32'h1000, 0, rd, w);
    expect_eq(w, -1, "no ack above window");
    bus(0, BASE - 4, 32'hFFFF_FFFF, rd, w);
    expect_eq(w, -1, "no ack below window");
    expect_eq(stalled, 3, "held-off writes");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
