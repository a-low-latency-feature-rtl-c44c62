// rbrief: rotated BRIEF descriptor generation from the local patch buffer.
//
// For each of the 256 sampling pairs ((x1,y1),(x2,y2)) the two points are
// rotated by the keypoint orientation theta = orient * 22.5 degrees,
//   xr = (x*cos - y*sin + 64) >>> 7,  yr = (x*sin + y*cos + 64) >>> 7,
// with cos and sin from a 16-entry Q7 look-up table, and descriptor bit i is
// 1 when the smoothed pixel at rotated point 1 is darker than the one at
// rotated point 2. Points are taken relative to the patch centre (logical
// row and column R); the physical column is (ptr + R + xr) mod (2R+1).
// Two pairs are evaluated per cycle through the four read ports of the patch
// buffer, so one descriptor takes NPAIRS/2 = 128 read cycles plus one.
//
// Interface: start (one cycle, with orient and ptr) while idle; the block
// drives the patch buffer read ports and pulses done with the 256-bit
// descriptor (bit i = pair i) 130 cycles after start.
//
// Rotated BRIEF with trigonometric and pattern look-up tables follows the
// published design. The Q7 table, the rounding and the sampling pattern
// itself (a fixed pseudo-random pattern within radius 15, see orb_pkg) are
// this design's choices; the published design uses the learned ORB pattern.
module rbrief
  import orb_pkg::*;
#(
  parameter int unsigned R = 22
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [ORIENT_W-1:0] orient,
  input  logic [5:0]          ptr,
  output logic                busy,
  // patch buffer read ports
  output logic                pb_re,
  output logic [5:0]          pb_rrow [4],
  output logic [5:0]          pb_rcol [4],
  input  pix_t                pb_rdata [4],
  output logic                done,
  output logic [NPAIRS-1:0]   desc
);
  localparam int unsigned N = 2 * R + 1;

  // Pattern look-up table: 20 bits per pair, four signed 5-bit coordinates
  // x1, y1, x2, y2 from the most significant end.
  function automatic logic [NPAIRS*20-1:0] gen_pattern();
    logic [NPAIRS*20-1:0] t = '0;
    for (int i = 0; i < int'(NPAIRS); i++)
      for (int c = 0; c < 4; c++)
        t[i*20 + (3-c)*5 +: 5] = 5'(pat_coord(i, c));
    return t;
  endfunction
  localparam logic [NPAIRS*20-1:0] PATTERN = gen_pattern();

  // Trigonometric look-up table, Q7 signed.
  function automatic logic signed [8:0] cos_lut(input logic [ORIENT_W-1:0] o);
    logic signed [8:0] r = '0;
    for (int k = 0; k < 16; k++) if (k == int'(o)) r = 9'(cos_q7(k));
    return r;
  endfunction
  function automatic logic signed [8:0] sin_lut(input logic [ORIENT_W-1:0] o);
    logic signed [8:0] r = '0;
    for (int k = 0; k < 16; k++) if (k == int'(o)) r = 9'(sin_q7(k));
    return r;
  endfunction

  logic signed [8:0] c_q, s_q;
  logic [5:0]        base;       // physical column of the patch centre, mod N
  logic [7:0]        idx;        // index of the first pair of this cycle
  logic              issue, cmp;
  logic [7:0]        cmp_idx;

  // Rotation of one point into patch-buffer row and physical column.
  function automatic logic [11:0] rot_point(input logic signed [4:0] x,
                                            input logic signed [4:0] y,
                                            input logic signed [8:0] cq,
                                            input logic signed [8:0] sq,
                                            input logic [5:0] b);
    logic signed [15:0] xr, yr;
    logic signed [7:0]  col;
    logic [5:0]         row;
    xr  = (16'(x) * 16'(cq) - 16'(y) * 16'(sq) + 16'sd64) >>> 7;
    yr  = (16'(x) * 16'(sq) + 16'(y) * 16'(cq) + 16'sd64) >>> 7;
    row = 6'(16'(R) + yr);
    col = 8'(b) + 8'(xr);
    if (col < 0)              col = col + 8'(N);
    else if (col >= 8'(N))    col = col - 8'(N);
    return {row, 6'(col)};
  endfunction

  always_comb begin
    pb_re = issue;
    for (int p = 0; p < 2; p++) begin
      logic [19:0] e;
      logic [11:0] a, b;
      e = PATTERN[(int'(idx) + p) * 20 +: 20];
      a = rot_point(e[19:15], e[14:10], c_q, s_q, base);
      b = rot_point(e[9:5],   e[4:0],   c_q, s_q, base);
      pb_rrow[2*p]   = a[11:6];
      pb_rcol[2*p]   = a[5:0];
      pb_rrow[2*p+1] = b[11:6];
      pb_rcol[2*p+1] = b[5:0];
    end
  end

  assign busy = issue || cmp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issue   <= 1'b0;
      cmp     <= 1'b0;
      idx     <= '0;
      cmp_idx <= '0;
      c_q     <= '0;
      s_q     <= '0;
      base    <= '0;
      done    <= 1'b0;
      desc    <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        issue <= 1'b1;
        idx   <= '0;
        c_q   <= cos_lut(orient);
        s_q   <= sin_lut(orient);
        base  <= (7'(ptr) + 7'(R) >= 7'(N)) ? 6'(7'(ptr) + 7'(R) - 7'(N)) : ptr + 6'(R);
      end else if (issue) begin
        idx <= idx + 8'd2;
        if (idx == 8'(NPAIRS - 2)) issue <= 1'b0;
      end
      // Comparison stage: read data of the pairs issued in the previous cycle.
      cmp     <= issue;
      cmp_idx <= idx;
      if (cmp) begin
        desc[cmp_idx]      <= pb_rdata[0] < pb_rdata[1];
        desc[cmp_idx + 1'b1] <= pb_rdata[2] < pb_rdata[3];
        if (cmp_idx == 8'(NPAIRS - 2)) done <= 1'b1;
      end
    end
  end

endmodule
