// crack_tracer: finds the object in the binary image and encodes its outer
// contour as a 4-direction crack (external chain) code.
//
// SCAN (IMG_H cycles): the image is read one row per cycle. Rows with at
// least DENS_TH white pixels belong to the object region; the first and the
// last such row bound it, and pixels in rows outside the region are treated
// as background. The origin is the left-most white pixel of the first region
// row.
// TRACE (one cycle per code): starting at the top-left corner of the origin
// pixel and heading right, the tracer walks along pixel edges ("cracks")
// with the object on its right-hand side, i.e. clockwise on the screen. At
// each contour vertex it looks at the two pixels ahead: if the one ahead on
// the right is background it turns right, otherwise if the one ahead on the
// left is white it turns left, otherwise it goes straight; then it moves one
// unit and emits the direction (0 right, 1 up, 2 left, 3 down). It stops on
// returning to the starting vertex. Checking the right pixel first makes
// diagonally touching pixels separate, i.e. the object is taken as
// 4-connected.
// The row density test, the origin rule, the clockwise walk, the crack code
// and its direction numbering follow the published pre-processing; the
// region rule (bounding rows), the turn rule and the one-move-per-cycle
// structure are this implementation's choices.
//
// Interface: start (accepted when idle); ra/rb/row_a/row_b (image rows);
// code_we/code_addr/code (one write per move into the code memory); busy;
// done (one-cycle pulse); len (number of codes); org_x/org_y (origin pixel);
// no_object (no row reached the density threshold); overflow (the contour
// did not close within MAX_LEN moves; the codes are then truncated).
// Timing: IMG_H + 1 scan cycles, then one cycle per code.
module crack_tracer
  import cc_pkg::*;
#(
  parameter int unsigned W     = IMG_W,
  parameter int unsigned H     = IMG_H,
  parameter int unsigned MAXL  = MAX_LEN,
  parameter int unsigned TH    = DENS_TH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  output logic [$clog2(H + 1):0]     ra,
  output logic [$clog2(H + 1):0]     rb,
  input  logic [W-1:0]               row_a,
  input  logic [W-1:0]               row_b,
  output logic                       code_we,
  output logic [$clog2(MAXL)-1:0]    code_addr,
  output logic [1:0]                 code,
  output logic                       busy,
  output logic                       done,
  output logic [$clog2(MAXL + 1)-1:0] len,
  output logic [$clog2(W + 1)-1:0]   org_x,
  output logic [$clog2(H + 1)-1:0]   org_y,
  output logic                       no_object,
  output logic                       overflow
);

  localparam int unsigned XW_ = $clog2(W + 1);
  localparam int unsigned YW_ = $clog2(H + 1);
  localparam int unsigned RW_ = $clog2(H + 1) + 1;

  typedef enum logic [1:0] {T_IDLE, T_SCAN, T_TRACE} tstate_e;

  tstate_e          state;
  logic [YW_-1:0]   scan_y;
  logic             found;
  logic [YW_-1:0]   first_y, last_y;
  logic [XW_-1:0]   vx;
  logic [YW_-1:0]   vy;
  dir_e             dir;

  // ---- scan: density and left-most white pixel of the current row
  logic [$clog2(W + 1)-1:0] row_count;
  logic [XW_-1:0]           row_first;
  always_comb begin
    row_count = '0;
    row_first = '0;
    for (int x = W - 1; x >= 0; x--) begin
      row_count = row_count + ($clog2(W + 1))'(row_a[x]);
      if (row_a[x]) row_first = XW_'(x);
    end
  end
  logic row_dense;
  assign row_dense = (row_count >= ($clog2(W + 1))'(TH));

  // ---- trace: the four pixels around vertex (vx, vy)
  function automatic logic pix(input logic [W-1:0] row, input logic row_ok,
                               input int x);
    return row_ok && x >= 0 && x < W && row[x];
  endfunction

  logic top_ok, bot_ok;         // rows vy-1 and vy lie inside the region
  logic nw, ne, sw, se, pl, pr;
  dir_e ndir;
  logic [XW_-1:0] nx;
  logic [YW_-1:0] ny;

  always_comb begin
    top_ok = (vy >= 1) && (vy - 1 >= first_y) && (vy - 1 <= last_y);
    bot_ok = (vy >= first_y) && (vy <= last_y) && (vy < YW_'(H));
    nw = pix(row_a, top_ok, int'(vx) - 1);
    ne = pix(row_a, top_ok, int'(vx));
    sw = pix(row_b, bot_ok, int'(vx) - 1);
    se = pix(row_b, bot_ok, int'(vx));
    unique case (dir)
      DIR_RIGHT: begin pl = ne; pr = se; end
      DIR_UP:    begin pl = nw; pr = ne; end
      DIR_LEFT:  begin pl = sw; pr = nw; end
      default:   begin pl = se; pr = sw; end
    endcase
    if (!pr)     ndir = dir_e'(dir - 2'd1);   // turn right
    else if (pl) ndir = dir_e'(dir + 2'd1);   // turn left
    else         ndir = dir;                  // straight
    nx = vx; ny = vy;
    unique case (ndir)
      DIR_RIGHT: nx = vx + 1'b1;
      DIR_UP:    ny = vy - 1'b1;
      DIR_LEFT:  nx = vx - 1'b1;
      default:   ny = vy + 1'b1;
    endcase
  end

  always_comb begin
    ra = (state == T_SCAN) ? RW_'(scan_y) : RW_'(vy) - RW_'(1);
    rb = RW_'(vy);
  end

  assign code_we   = (state == T_TRACE) && (len < ($clog2(MAXL + 1))'(MAXL));
  assign code_addr = len[$clog2(MAXL)-1:0];
  assign code      = ndir;
  assign busy      = (state != T_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      scan_y    <= '0;
      found     <= 1'b0;
      first_y   <= '0;
      last_y    <= '0;
      vx        <= '0;
      vy        <= '0;
      dir       <= DIR_RIGHT;
      len       <= '0;
      org_x     <= '0;
      org_y     <= '0;
      no_object <= 1'b0;
      overflow  <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          state     <= T_SCAN;
          scan_y    <= '0;
          found     <= 1'b0;
          len       <= '0;
          no_object <= 1'b0;
          overflow  <= 1'b0;
        end
        T_SCAN: begin
          if (row_dense) begin
            last_y <= scan_y;
            if (!found) begin
              found   <= 1'b1;
              first_y <= scan_y;
              org_x   <= row_first;
              org_y   <= scan_y;
            end
          end
          if (scan_y == YW_'(H - 1)) begin
            if (!found && !row_dense) begin
              no_object <= 1'b1;
              done      <= 1'b1;
              state     <= T_IDLE;
            end else begin
              state <= T_TRACE;
              dir   <= DIR_RIGHT;
              if (found) begin
                vx <= org_x;
                vy <= org_y;
              end else begin
                vx <= row_first;
                vy <= scan_y;
              end
            end
          end else begin
            scan_y <= scan_y + 1'b1;
          end
        end
        T_TRACE: begin
          if (len == ($clog2(MAXL + 1))'(MAXL)) begin
            overflow <= 1'b1;
            done     <= 1'b1;
            state    <= T_IDLE;
          end else begin
            vx  <= nx;
            vy  <= ny;
            dir <= ndir;
            len <= len + 1'b1;
            if (nx == org_x && ny == org_y) begin
              done  <= 1'b1;
              state <= T_IDLE;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
