// tb_recognition_sopc: end-to-end test of the whole accelerator side of the
// system, acting as the processor on the shared bus. For each picture it
//  1. draws a square, circle, rectangle, triangle or blob at a random place
//     and size and writes the 64x64 image into the chain-code unit,
//  2. starts the unit, polls STATUS, and checks no_object / overflow /
//     length / origin, sampled code words and all 16 slope codes against
//     the reference model,
//  3. maps the slope codes to network inputs (x = 16 * slope - 120, a choice
//     of this test's "software"), writes them to the network unit, polls it
//     and checks the class and scores against the reference network and the
//     result_shape output.
// Along the way it exercises and counts each mechanism: image writes held
// off during a trace, a start ignored during a trace, empty images, contour
// overflow, network input writes held off during a run, discarded partial
// input, unmapped reads in both windows, addresses outside both windows (no
// acknowledge), and reads from both slaves through the ORed read bus. If the
// pictures have not produced all four class codes, further random input
// vectors are sent until they have.
module tb_recognition_sopc;
  import cc_ref_pkg::*;
  import nn_ref_pkg::*;
  localparam logic [31:0] NN = 32'h8000_0000;
  localparam logic [31:0] CC = 32'h8001_0000;
  logic clk = 0, rst_n;
  logic plb_pavalid, plb_rnw;
  logic [31:0] plb_abus, plb_wrdbus;
  logic sl_addrack, sl_wrdack, sl_rddack, result_valid;
  logic [31:0] sl_rddbus;
  logic [1:0] result_shape;
  int checks = 0, failures = 0;
  int n_img_stall = 0, n_ign_start = 0, n_no_obj = 0, n_ovf = 0, n_nn_stall = 0;
  int n_discard = 0, n_unmapped = 0, n_foreign = 0, n_pictures = 0, n_extra = 0;
  int shape_seen [4];
  image_t img;

  recognition_sopc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
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
                     output logic [31:0] rd, output int waits);
    waits = 0;
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d;
    @(posedge clk); #1;
    while (!sl_addrack && waits < 5000) begin
      @(posedge clk); #1; waits++;
    end
    if (!sl_addrack) waits = -1;
    rd = sl_rddbus;
    @(negedge clk);
    plb_pavalid = 0;
  endtask

  task automatic write_image();
    logic [31:0] rd, d;
    int w;
    for (int n = 0; n < 128; n++) begin
      for (int b = 0; b < 32; b++) d[b] = img[n / 2][32 * (n % 2) + b];
      bus(0, CC + 4 * n, d, rd, w);
    end
  endtask

  // send 16 inputs to the network, check its answer, return the class
  task automatic classify_on_chip(int xi [16], string name, bit try_stall);
    logic [31:0] rd;
    int w, y [4], sat, exp_shape;
    exp_shape = classify(xi, y, sat);
    for (int i = 0; i < 16; i++) bus(0, NN, 32'(xi[i]), rd, w);
    if (try_stall) begin
      // first input of the next vector arrives while the network runs
      bus(0, NN, 32'h11, rd, w);
      expect_eq(int'(w > 0), 1, {name, " network write held off"});
      n_nn_stall += (w > 0);
      // that write was taken after the run, so it already counts as input
      // for the next vector and done is cleared again
      bus(1, NN + 4, 0, rd, w);
      expect_eq(rd[12:8], 1, {name, " early input buffered"});
    end else begin
      do bus(1, NN + 4, 0, rd, w); while (!rd[0]);
    end
    expect_eq(rd[5:4], exp_shape, {name, " class"});
    expect_eq(result_shape, exp_shape, {name, " result_shape"});
    for (int k = 0; k < 4; k++) begin
      bus(1, NN + 32'h10 + 4 * k, 0, rd, w);
      expect_eq(int'(rd), y[k], {name, " score"});
    end
    if (try_stall) bus(0, NN + 8, 1, rd, w);   // drop the early input
    shape_seen[exp_shape]++;
  endtask

  task automatic picture(string name, int t);
    logic [31:0] rd;
    int w, codes [$], ox, oy, s [16], xi [16];
    bit ovf, obj;
    obj = trace(img, 1024, codes, ox, oy, ovf);
    write_image();
    bus(0, CC + 32'h800, 1, rd, w);
    if (t % 3 == 0) begin
      bus(0, CC + 32'h800, 1, rd, w);            // ignored: already running
      bus(1, CC + 32'h804, 0, rd, w);
      if (rd[1]) n_ign_start++;
      // overwrite an image word that is background in this picture
      bus(0, CC + 32'h1FC, 32'h0, rd, w);
      if (w > 0) n_img_stall++;
      expect_eq(int'(w > 0 || !obj), 1, {name, " image write held off"});
    end
    do bus(1, CC + 32'h804, 0, rd, w); while (!rd[0]);
    expect_eq(rd[2], !obj, {name, " no_object"});
    n_pictures++;
    if (!obj) begin
      n_no_obj++;
      return;
    end
    expect_eq(rd[3], ovf, {name, " overflow"});
    expect_eq(rd[26:16], codes.size(), {name, " length"});
    n_ovf += ovf;
    bus(1, CC + 32'h808, 0, rd, w);
    expect_eq(rd[6:0], ox, {name, " origin x"});
    expect_eq(rd[14:8], oy, {name, " origin y"});
    for (int wd = 0; wd < (codes.size() + 15) / 16; wd += 5) begin
      bus(1, CC + 32'h400 + 4 * wd, 0, rd, w);
      for (int k = 0; k < 16 && 16 * wd + k < codes.size(); k++) begin
        checks++;
        if (rd[2*k +: 2] != 2'(codes[16 * wd + k])) begin
          failures++; $display("FAIL %s code %0d", name, 16 * wd + k);
        end
      end
    end
    slopes(codes, s);
    for (int k = 0; k < 16; k++) begin
      bus(1, CC + 32'h840 + 4 * k, 0, rd, w);
      expect_eq(rd, s[k], $sformatf("%s slope %0d", name, k));
      xi[k] = 16 * int'(rd[3:0]) - 120;
    end
    if (t % 4 == 1) begin
      for (int i = 0; i < 5; i++) bus(0, NN, 32'h7F, rd, w);
      bus(0, NN + 8, 1, rd, w);
      bus(1, NN + 4, 0, rd, w);
      expect_eq(rd[12:8], 0, {name, " discard"});
      n_discard++;
    end
    classify_on_chip(xi, name, t % 5 == 2);
  endtask

  initial begin
    logic [31:0] rd;
    int w, xi [16];
    load();
    foreach (shape_seen[k]) shape_seen[k] = 0;
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    plb_pavalid = 0; plb_rnw = 0; plb_abus = 0; plb_wrdbus = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 40; t++) begin
      clear(img);
      case (t % 6)
        0: begin int s = $urandom_range(6, 40); rect(img, $urandom_range(1, 62 - s), $urandom_range(1, 60 - s), s, s); end
        1: disc(img, $urandom_range(16, 47), $urandom_range(16, 45), $urandom_range(5, 15));
        2: rect(img, $urandom_range(1, 15), $urandom_range(1, 30), $urandom_range(30, 45), $urandom_range(6, 20));
        3: triangle(img, $urandom_range(22, 41), $urandom_range(1, 15), $urandom_range(8, 20), $urandom_range(12, 40));
        4: for (int k = 0; k < 5; k++) disc(img, $urandom_range(20, 40), $urandom_range(20, 40), $urandom_range(2, 8));
        default: if (t % 12 == 5) begin   // comb: contour too long
          rect(img, 0, 0, 64, 2);
          for (int x = 0; x < 64; x += 2) rect(img, x, 2, 1, 60);
        end                               // else: empty picture
      endcase
      picture($sformatf("picture%0d", t), t);
      if (t % 8 == 0) begin
        bus(1, NN + 32'h40, 0, rd, w);
        expect_eq(rd, 0, "network unmapped read");
        bus(1, CC + 32'hC00, 0, rd, w);
        expect_eq(rd, 0, "pre-processing unmapped read");
        n_unmapped += 2;
        bus(0, 32'h8002_0000, 32'hDEAD, rd, w);
        expect_eq(w, -1, "address outside both units");
        bus(1, 32'h0000_1000, 0, rd, w);
        expect_eq(w, -1, "address outside both units");
        n_foreign += 2;
      end
    end

    // top up: random inputs until every class code has come out
    while ((shape_seen[0] == 0 || shape_seen[1] == 0 || shape_seen[2] == 0 ||
            shape_seen[3] == 0) && n_extra < 200) begin
      for (int i = 0; i < 16; i++) xi[i] = $urandom_range(0, 255) - 128;
      classify_on_chip(xi, "extra", 0);
      n_extra++;
    end

    $display("pictures=%0d no_object=%0d overflow=%0d image_stalls=%0d ignored_starts=%0d",
             n_pictures, n_no_obj, n_ovf, n_img_stall, n_ign_start);
    $display("network_stalls=%0d discards=%0d unmapped=%0d outside=%0d extra_vectors=%0d",
             n_nn_stall, n_discard, n_unmapped, n_foreign, n_extra);
    $display("classes: square=%0d circle=%0d rectangle=%0d triangle=%0d",
             shape_seen[0], shape_seen[1], shape_seen[2], shape_seen[3]);
    expect_eq(int'(n_no_obj > 0), 1, "empty picture seen");
    expect_eq(int'(n_ovf > 0), 1, "overflow seen");
    expect_eq(int'(n_img_stall > 0), 1, "image stall seen");
    expect_eq(int'(n_ign_start > 0), 1, "ignored start seen");
    expect_eq(int'(n_nn_stall > 0), 1, "network stall seen");
    expect_eq(int'(n_discard > 0), 1, "discard seen");
    expect_eq(int'(n_unmapped > 0), 1, "unmapped read seen");
    expect_eq(int'(n_foreign > 0), 1, "outside access seen");
    for (int k = 0; k < 4; k++) expect_eq(int'(shape_seen[k] > 0), 1, "class code seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
