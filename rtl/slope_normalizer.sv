// slope_normalizer: turns a variable-length crack code into a fixed number
// of quantised slopes, the input signature of the neural network.
//
// The contour of length L is cut into N_SEG consecutive pieces; piece k
// holds the codes floor(k*L/N_SEG) .. floor((k+1)*L/N_SEG)-1. The unit moves
// of each piece are summed into the displacement (dx, dy) between its end
// points (dy counted upwards), and that direction is quantised into one of
// 16 sectors of 22.5 degrees: slope code s covers angles
// [s*22.5, (s+1)*22.5) measured counter-clockwise from the +x axis. The
// sector is found exactly in integer arithmetic: the vector is rotated by a
// multiple of 90 degrees into the first quadrant as (u, v) with u > 0,
// v >= 0, and compared against tan(22.5) = sqrt(2)-1, tan(45) = 1 and
// tan(67.5) = sqrt(2)+1 through (v+u)^2 < 2u^2, v < u and (v-u)^2 < 2u^2.
// An empty piece (possible only when L < N_SEG) or a zero displacement
// gives code 0. Splitting into a fixed number of pieces and taking the
// slope between end points follows the published pre-processing; the
// angle quantisation into 16 codes is this implementation's choice (the
// published text only says the slopes take a definite number of values).
//
// Interface: start / len (begin on a stored contour of len codes), raddr /
// rdata (code memory read port), busy, done (one-cycle pulse),
// slope[k] (code of piece k, held until the next start).
// Timing: one cycle per code plus one per piece, L + N_SEG cycles.
module slope_normalizer
  import cc_pkg::*;
#(
  parameter int unsigned NSEG = N_SEG,
  parameter int unsigned MAXL = MAX_LEN
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [$clog2(MAXL + 1)-1:0]  len,
  output logic [$clog2(MAXL)-1:0]      raddr,
  input  logic [1:0]                   rdata,
  output logic                         busy,
  output logic                         done,
  output logic [SLW-1:0]               slope [NSEG]
);

  localparam int unsigned LW_ = $clog2(MAXL + 1);
  localparam int unsigned DW_ = LW_ + 1;
  localparam int unsigned BW_ = LW_ + $clog2(NSEG) + 1;   // k*L

  logic                     run;
  logic [LW_-1:0]           idx;       // next code to consume
  logic [$clog2(NSEG)-1:0]  seg;       // current piece
  logic [BW_-1:0]           bacc;      // (seg+1) * len
  logic signed [DW_-1:0]    dx, dy;

  logic [LW_-1:0] bound;               // end of the current piece
  assign bound = LW_'(bacc / BW_'(NSEG));

  assign raddr = idx[$clog2(MAXL)-1:0];
  assign busy  = run;

  // 16-sector quantiser
  function automatic logic [SLW-1:0] sector(input logic signed [DW_-1:0] x,
                                            input logic signed [DW_-1:0] y);
    logic [1:0]                q;
    logic signed [2*DW_+3:0]   u, v, uu2, a2, c2;
    logic [1:0]                s;
    if (x > 0 && y >= 0)       begin q = 2'd0; u = (2*DW_+4)'(x);  v = (2*DW_+4)'(y);  end
    else if (x <= 0 && y > 0)  begin q = 2'd1; u = (2*DW_+4)'(y);  v = -(2*DW_+4)'(x); end
    else if (x < 0 && y <= 0)  begin q = 2'd2; u = -(2*DW_+4)'(x); v = -(2*DW_+4)'(y); end
    else                       begin q = 2'd3; u = -(2*DW_+4)'(y); v = (2*DW_+4)'(x);  end
    uu2 = 2 * u * u;
    a2  = (v + u) * (v + u);
    c2  = (v - u) * (v - u);
    if (x == 0 && y == 0) return '0;
    if (a2 < uu2)         s = 2'd0;
    else if (v < u)       s = 2'd1;
    else if (c2 < uu2)    s = 2'd2;
    else                  s = 2'd3;
    return {q, s};
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run  <= 1'b0;
      idx  <= '0;
      seg  <= '0;
      bacc <= '0;
      dx   <= '0;
      dy   <= '0;
      done <= 1'b0;
      for (int k = 0; k < NSEG; k++) slope[k] <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run  <= 1'b1;
          idx  <= '0;
          seg  <= '0;
          bacc <= BW_'(len);
          dx   <= '0;
          dy   <= '0;
        end
      end else if (idx == bound) begin
        // close the current piece
        slope[seg] <= sector(dx, dy);
        dx   <= '0;
        dy   <= '0;
        bacc <= bacc + BW_'(len);
        if (seg == $clog2(NSEG)'(NSEG - 1)) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          seg <= seg + 1'b1;
        end
      end else begin
        // consume one unit move
        unique case (dir_e'(rdata))
          DIR_RIGHT: dx <= dx + 1'b1;
          DIR_UP:    dy <= dy + 1'b1;
          DIR_LEFT:  dx <= dx - 1'b1;
          default:   dy <= dy - 1'b1;
        endcase
        idx <= idx + 1'b1;
      end
    end
  end

endmodule
