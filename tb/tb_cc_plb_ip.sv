// tb_cc_plb_ip: the chain-code unit seen from the bus. Writes pictures
// (squares, discs, triangles, an empty image, a comb that overflows),
// starts the unit, polls STATUS and checks flags, length, origin, every
// code word and every slope register against the reference model. Also
// checks that the read bus is zero when no read is acknowledged.
module tb_cc_plb_ip;
  import cc_ref_pkg::*;
  localparam logic [31:0] CC = 32'h8001_0000;
  logic clk = 0, rst_n;
  logic plb_pavalid, plb_rnw;
  logic [31:0] plb_abus, plb_wrdbus;
  logic sl_addrack, sl_wrdack, sl_rddack;
  logic [31:0] sl_rddbus;
  int checks = 0, failures = 0;
  image_t img;

  cc_plb_ip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && !sl_rddack) begin
    checks++;
    if (sl_rddbus !== 0) begin failures++; $display("FAIL read bus not idle"); end
  end

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++; $display("FAIL %s: %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic bus(input logic rnw, input logic [31:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    int waits = 0;
    @(negedge clk);
    plb_pavalid = 1; plb_rnw = rnw; plb_abus = a; plb_wrdbus = d;
    @(posedge clk); #1;
    while (!sl_addrack && waits < 5000) begin
      @(posedge clk); #1; waits++;
    end
    rd = sl_rddbus;
    @(negedge clk);
    plb_pavalid = 0;
  endtask

  task automatic picture(string name);
    logic [31:0] rd, d;
    int codes [$], ox, oy, s [16];
    bit ovf, obj;
    obj = trace(img, 1024, codes, ox, oy, ovf);
    for (int n = 0; n < 128; n++) begin
      for (int b = 0; b < 32; b++) d[b] = img[n / 2][32 * (n % 2) + b];
      bus(0, CC + 4 * n, d, rd);
    end
    bus(0, CC + 32'h800, 1, rd);
    do bus(1, CC + 32'h804, 0, rd); while (!rd[0]);
    expect_eq(rd[2], !obj, {name, " no_object"});
    if (!obj) return;
    expect_eq(rd[3], ovf, {name, " overflow"});
    expect_eq(rd[26:16], codes.size(), {name, " length"});
    bus(1, CC + 32'h808, 0, rd);
    expect_eq(rd, {oy[7:0], ox[7:0]}, {name, " origin"});
    for (int wd = 0; wd < (codes.size() + 15) / 16; wd++) begin
      bus(1, CC + 32'h400 + 4 * wd, 0, rd);
      for (int k = 0; k < 16 && 16 * wd + k < codes.size(); k++) begin
        checks++;
        if (rd[2*k +: 2] != 2'(codes[16 * wd + k])) begin
          failures++; $display("FAIL %s code %0d", name, 16 * wd + k);
        end
      end
    end
    slopes(codes, s);
    for (int k = 0; k < 16; k++) begin
      bus(1, CC + 32'h840 + 4 * k, 0, rd);
      expect_eq(rd, s[k], $sformatf("%s slope %0d", name, k));
    end
  endtask

  initial begin
    rst_n = 1; #1 rst_n = 0;  // a real falling edge for the asynchronous reset
    plb_pavalid = 0; plb_rnw = 0; plb_abus = 0; plb_wrdbus = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      clear(img);
      case (t % 4)
        0: begin int s = $urandom_range(6, 40); rect(img, $urandom_range(0, 63 - s), $urandom_range(0, 63 - s), s, s); end
        1: disc(img, $urandom_range(16, 47), $urandom_range(16, 47), $urandom_range(5, 15));
        2: triangle(img, $urandom_range(22, 41), $urandom_range(0, 15), $urandom_range(8, 20), $urandom_range(12, 45));
        default: rect(img, $urandom_range(0, 10), $urandom_range(0, 40), $urandom_range(20, 50), $urandom_range(3, 20));
      endcase
      picture($sformatf("picture%0d", t));
    end
    clear(img);
    picture("empty");
    rect(img, 0, 0, 64, 2);
    for (int x = 0; x < 64; x += 2) rect(img, x, 2, 1, 60);
    picture("comb");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
