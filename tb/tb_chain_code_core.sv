// tb_chain_code_core: loads images through the 32-bit image port, starts
// the unit and checks everything it reports against the reference model:
// no_object, overflow, origin, length, every code (read back through the
// packed code port) and the 16 slope codes. Shapes: the published example
// contour, squares, rectangles, discs, triangles, blobs, an empty image and
// a comb that overflows the code store. Also checks the total cycle count
// (scan + trace + one hand-over cycle + normalisation) and that busy stays
// high until done.
module tb_chain_code_core;
  import cc_ref_pkg::*;
  localparam int MAXL = 1024;
  logic clk = 0, rst_n, img_we, start, busy, done, no_object, overflow;
  logic [6:0] img_waddr;
  logic [31:0] img_wdata;
  logic [10:0] len;
  logic [6:0] org_x, org_y;
  logic [3:0] slope [16];
  logic [5:0] code_word_addr;
  logic [31:0] code_word;
  int checks = 0, failures = 0;
  image_t img;

  chain_code_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint g, longint e, string what);
    checks++;
    if (g != e) begin
      failures++; $display("FAIL %s: %0d exp %0d", what, g, e);
    end
  endtask

  task automatic load_image();
    for (int n = 0; n < 128; n++) begin
      @(negedge clk);
      img_we = 1; img_waddr = 7'(n);
      for (int b = 0; b < 32; b++) img_wdata[b] = img[n / 2][32 * (n % 2) + b];
    end
    @(negedge clk) img_we = 0;
  endtask

  task automatic run_and_check(string name);
    int codes [$], ox, oy, cyc, s [16], exp_cyc;
    bit ovf, obj, busy_ok = 1;
    obj = trace(img, MAXL, codes, ox, oy, ovf);
    load_image();
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin
      if (!busy) busy_ok = 0;
      @(negedge clk); cyc++;
    end
    expect_eq(busy_ok, 1, {name, " busy while working"});
    expect_eq(no_object, !obj, {name, " no_object"});
    exp_cyc = 65 + (obj ? codes.size() + (ovf ? 1 : 0) + 1 + codes.size() + 17 : 0);
    expect_eq(cyc, exp_cyc, {name, " cycles"});
    if (!obj) return;
    expect_eq(overflow, ovf, {name, " overflow"});
    expect_eq(org_x, ox, {name, " origin x"});
    expect_eq(org_y, oy, {name, " origin y"});
    expect_eq(len, codes.size(), {name, " length"});
    for (int w = 0; w < (codes.size() + 15) / 16; w++) begin
      code_word_addr = 6'(w); #1;
      for (int k = 0; k < 16 && 16 * w + k < codes.size(); k++) begin
        checks++;
        if (code_word[2*k +: 2] != 2'(codes[16 * w + k])) begin
          failures++; $display("FAIL %s code %0d", name, 16 * w + k);
        end
      end
    end
    slopes(codes, s);
    for (int k = 0; k < 16; k++) expect_eq(slope[k], s[k], $sformatf("%s slope %0d", name, k));
  endtask

  initial begin
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    start = 0; img_we = 0; img_waddr = 0; img_wdata = 0; code_word_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    clear(img); img[5][60] = 1;
    run_and_check("pixel");

    for (int t = 0; t < 25; t++) begin
      clear(img);
      case (t % 5)
        0: begin int s = $urandom_range(3, 30); rect(img, $urandom_range(0, 63 - s), $urandom_range(0, 63 - s), s, s); end
        1: rect(img, $urandom_range(0, 20), $urandom_range(0, 30), $urandom_range(10, 40), $urandom_range(4, 30));
        2: disc(img, $urandom_range(15, 48), $urandom_range(15, 48), $urandom_range(3, 14));
        3: triangle(img, $urandom_range(20, 43), $urandom_range(0, 20), $urandom_range(5, 20), $urandom_range(8, 40));
        default: for (int k = 0; k < 6; k++) disc(img, $urandom_range(20, 40), $urandom_range(20, 40), $urandom_range(2, 8));
      endcase
      run_and_check($sformatf("shape%0d", t));
    end

    clear(img);
    run_and_check("empty");
    expect_eq(no_object, 1, "no object flagged");

    clear(img);
    rect(img, 0, 0, 64, 2);
    for (int x = 0; x < 64; x += 2) rect(img, x, 2, 1, 60);
    run_and_check("comb");
    expect_eq(overflow, 1, "overflow flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
