// tb_crack_tracer: checks origin search and contour tracing against the
// reference model on
//  - a single pixel (code 0 3 2 1),
//  - the published 34-move example contour "0030300010103303232322221222121101"
//    (the shape is rebuilt by filling that contour, then traced again),
//  - squares, rectangles, discs, triangles and random blobs at random places,
//  - an empty image (no_object) and a comb whose contour is longer than the
//    code memory (overflow).
// It also checks the cycle count: IMG_H+1 scan cycles plus one per code.
module tb_crack_tracer;
  import cc_ref_pkg::*;
  localparam int MAXL = 1024;
  logic clk = 0, rst_n, start, code_we, busy, done, no_object, overflow;
  logic [7:0] ra, rb;
  logic [63:0] row_a, row_b;
  logic [9:0] code_addr;
  logic [1:0] code;
  logic [10:0] len;
  logic [6:0] org_x, org_y;
  int checks = 0, failures = 0;
  image_t img;
  logic [1:0] got [MAXL];

  crack_tracer dut (.*);

  always #5 clk = ~clk;

  function automatic logic [63:0] row(logic [7:0] y);
    logic [63:0] r = '0;
    if (y < 64) for (int x = 0; x < 64; x++) r[x] = img[y][x];
    return r;
  endfunction
  assign row_a = row(ra);
  assign row_b = row(rb);

  always @(posedge clk) if (code_we) got[code_addr] <= code;

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic run_and_check(string name);
    int codes [$], ox, oy, cyc;
    bit ovf, obj;
    obj = trace(img, MAXL, codes, ox, oy, ovf);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done && cyc < 5000) begin
      @(negedge clk); cyc++;
    end
    expect_eq(no_object, !obj, {name, " no_object"});
    if (!obj) return;
    expect_eq(overflow, ovf, {name, " overflow"});
    expect_eq(org_x, ox, {name, " origin x"});
    expect_eq(org_y, oy, {name, " origin y"});
    expect_eq(len, codes.size(), {name, " length"});
    expect_eq(cyc, 65 + codes.size() + (ovf ? 1 : 0), {name, " cycles"});
    for (int i = 0; i < codes.size() && i < MAXL; i++) begin
      checks++;
      if (got[i] != 2'(codes[i])) begin
        failures++; $display("FAIL %s code %0d: %0d exp %0d", name, i, got[i], codes[i]);
        break;
      end
    end
  endtask

  // fill the pixels enclosed by a closed crack code that starts at (x0, y0)
  task automatic fill_from_code(string s, int x0, int y0);
    int vx [$], vy [$], cx = x0, cy = y0;
    for (int i = 0; i < s.len(); i++) begin
      int d = s[i] - "0";
      if (d == 1 || d == 3) begin
        vx.push_back(cx);
        vy.push_back(d == 1 ? cy - 1 : cy);   // upper end of the vertical edge
      end
      case (d)
        0: cx++;
        1: cy--;
        2: cx--;
        default: cy++;
      endcase
    end
    clear(img);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      int n = 0;
      foreach (vx[e]) if (vy[e] == y && vx[e] > x) n++;
      img[y][x] = n % 2;
    end
  endtask

  initial begin
    string fig1 = "0030300010103303232322221222121101";
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    start = 0;
    clear(img);
    repeat (2) @(negedge clk);
    rst_n = 1;

    // single pixel
    clear(img); img[20][30] = 1;
    run_and_check("pixel");
    expect_eq({got[0], got[1], got[2], got[3]}, {2'd0, 2'd3, 2'd2, 2'd1}, "pixel code 0321");

    // the published example contour
    fill_from_code(fig1, 10, 10);
    run_and_check("example");
    expect_eq(len, fig1.len(), "example length");
    for (int i = 0; i < fig1.len(); i++) begin
      checks++;
      if (got[i] != 2'(fig1[i] - "0")) begin
        failures++; $display("FAIL example code %0d", i);
      end
    end

    // shapes
    for (int t = 0; t < 40; t++) begin
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

    // nothing there
    clear(img);
    run_and_check("empty");
    expect_eq(no_object, 1, "no object flagged");

    // comb: contour longer than the code memory
    clear(img);
    rect(img, 0, 0, 64, 2);
    for (int x = 0; x < 64; x += 2) rect(img, x, 2, 1, 60);
    run_and_check("comb");
    expect_eq(overflow, 1, "overflow flagged");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
