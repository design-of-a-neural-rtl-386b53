// tb_nn_plb_ip: end-to-end test of the neural-network peripheral at its
// default sizes (16-32-4 network, full ROMs), driven the way the processor
// drives it: 16 bus writes of the input signature, polling STATUS, reading
// the shape code and the four scores. Every result is compared with the
// integer reference model. It also checks the network latency (result 54
// cycles after the classification starts, i.e. after the 16th DATA write is
// acknowledged) and counts that each mechanism of the design occurred:
// wait states on a DATA write during a run, discarding a partial vector,
// activation-table saturation, every one of the four shape codes, a read of
// an unmapped register and an access to a foreign address.
module tb_nn_plb_ip;
  import nn_pkg::*;
  import nn_ref_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  logic clk = 0, rst_n;
  logic plb_pavalid, plb_rnw, sl_addrack, sl_wrdack, sl_rddack;
  logic [31:0] plb_abus, plb_wrdbus, sl_rddbus;
  logic result_valid;
  logic [1:0] result_shape;
  int checks = 0, failures = 0;
  int cycle = 0, start_cycle = 0, valid_cycle = 0;
  int n_stall = 0, n_discard = 0, n_sat = 0, n_unmapped = 0, n_foreign = 0;
  int shape_seen [4];

  nn_plb_ip dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (result_valid) valid_cycle <= cycle;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic bus(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output int waits, output int ack_cycle);
    waits = 0;
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d;
    @(posedge clk); #1;
    while (!sl_addrack && waits < 200) begin
      @(posedge clk); #1; waits++;
    end
    if (!sl_addrack) waits = -1;
    ack_cycle = cycle;
    rd = sl_rddbus;
    @(negedge clk);
    plb_pavalid = 0;
  endtask

  initial begin
    logic [31:0] rd;
    int waits, ac, xi [16], y [4], exp_shape, sat;
    load();
    foreach (shape_seen[k]) shape_seen[k] = 0;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    plb_pavalid = 0; plb_rnw = 0; plb_abus = 0; plb_wrdbus = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < 16; i++) begin
        case (t % 3)
          0: xi[i] = $urandom_range(0, 15) - 8;
          1: xi[i] = $urandom_range(0, 63) - 32;
          default: xi[i] = $urandom_range(0, 255) - 128;
        endcase
      end
      // a few vectors aligned with one neuron's weights drive its sum past
      // the activation table (positive, then negative)
      if (t == 2 || t == 5)
        for (int i = 0; i < 16; i++)
          xi[i] = ((w1[i*32 + t] >= 0) == (t == 2)) ? 127 : -128;
      exp_shape = classify(xi, y, sat);
      n_sat += sat;
      // every 7th vector: write a few samples, then discard them
      if (t % 7 == 3) begin
        for (int i = 0; i < 4; i++) bus(0, BASE, 32'hFF, rd, waits, ac);
        bus(0, BASE + 8, 1, rd, waits, ac);
        bus(1, BASE + 4, 0, rd, waits, ac);
        expect_eq(rd[12:8], 0, "discard");
        n_discard++;
      end
      for (int i = 0; i < 16; i++) begin
        bus(0, BASE, 32'(xi[i]), rd, waits, ac);
        n_stall += (waits > 0);
      end
      start_cycle = ac;
      // keep polling STATUS until done
      do bus(1, BASE + 4, 0, rd, waits, ac); while (!rd[0]);
      expect_eq(valid_cycle - start_cycle, LATENCY + 1, "latency");
      expect_eq(rd[5:4], exp_shape, "shape");
      expect_eq(result_shape, exp_shape, "result_shape port");
      shape_seen[exp_shape]++;
      for (int k = 0; k < 4; k++) begin
        bus(1, BASE + 32'h10 + 4 * k, 0, rd, waits, ac);
        expect_eq(int'(rd), y[k], "score");
      end
      // every 5th vector: the next vector's first sample is written right
      // after the start and must be held off until the run ends
      if (t % 5 == 4) begin
        for (int i = 0; i < 16; i++) bus(0, BASE, 32'(i), rd, waits, ac);
        bus(0, BASE, 32'h5, rd, waits, ac);
        if (waits > 0) n_stall++;
        expect_eq(int'(waits > 0), 1, "stall");
        bus(0, BASE + 8, 1, rd, waits, ac);
      end
      if (t % 10 == 0) begin
        bus(1, BASE + 32'hC0, 0, rd, waits, ac);
        expect_eq(rd, 0, "unmapped");
        n_unmapped++;
        bus(0, 32'h4000_0000, 0, rd, waits, ac);
        expect_eq(waits, -1, "foreign");
        n_foreign++;
      end
    end

    $display("stalls=%0d discards=%0d saturations=%0d unmapped=%0d foreign=%0d",
             n_stall, n_discard, n_sat, n_unmapped, n_foreign);
    $display("shapes: square=%0d circle=%0d rectangle=%0d triangle=%0d",
             shape_seen[0], shape_seen[1], shape_seen[2], shape_seen[3]);
    expect_eq(int'(n_stall > 0), 1, "stall mechanism seen");
    expect_eq(int'(n_discard > 0), 1, "discard mechanism seen");
    expect_eq(int'(n_sat > 0), 1, "saturation seen");
    expect_eq(int'(n_unmapped > 0), 1, "unmapped read seen");
    expect_eq(int'(n_foreign > 0), 1, "foreign access seen");
    for (int k = 0; k < 4; k++) expect_eq(int'(shape_seen[k] > 0), 1, "shape code seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
