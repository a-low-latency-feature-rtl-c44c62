// nms3x3: two-stage 3x3 non-maximum suppression over the oFAST output stream.
//
// A keypoint must be a FAST candidate whose score is strictly higher than the
// scores of all eight neighbours. The stream (every pixel, candidate or not,
// in raster order) enters three registers B1 (newest), B2 and B3, so B2 has
// its left and right neighbours beside it.
//  * NMS I (CMPB): B2 survives if it is a candidate and beats B1 and B3.
//  * B2 is written to the candidate buffer, one entry per column, with its
//    survive flag, score, orientation and the maximum score of B1..B3.
//  * At the same time the entry of the same column one row up is read into
//    RegA. NMS II (CMPA): A becomes a keypoint if its flag is set and its
//    score beats the row-maximum of B1..B3 (its three lower neighbours). In
//    the same comparison B2's flag is cleared unless B2 beats the row maximum
//    stored with A (its three upper neighbours). Thus both stages together
//    compare each candidate with all eight neighbours.
// Neighbours from another row (at row ends) and the row above the first row
// count as score 0.
//
// Interface: one cand_t per in_valid with its stream position; a keypoint is
// reported (out_valid, position of A, orientation, score) two cycles after
// the pixel right of A's lower neighbour arrives.
//
// The B1-B3 / RegA register structure, the candidate buffer and the two
// comparators follow the published design. Storing the row maximum with each
// candidate-buffer entry, so that the upper neighbours are covered too, is
// this design's reading of how the 8-neighbour rule is met.
module nms3x3
  import orb_pkg::*;
#(
  parameter int unsigned W = 1920
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  cand_t                in_cand,
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  output logic                 out_valid,
  output logic [COORD_W-1:0]   out_x,
  output logic [COORD_W-1:0]   out_y,
  output logic [ORIENT_W-1:0]  out_orient,
  output logic [SCORE_W-1:0]   out_score
);
  localparam int unsigned XW = $clog2(W);

  typedef struct packed {
    cand_t              c;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } reg_t;

  typedef struct packed {
    logic                flag;
    logic [ORIENT_W-1:0] orient;
    logic [SCORE_W-1:0]  score;
    logic [SCORE_W-1:0]  max3;
  } cbuf_t;

  reg_t  b1, b2, b3;
  logic  eval;
  cbuf_t cbuf [W];
  cbuf_t a_raw, a, wr;

  // Shift register and candidate-buffer read of the column that enters B2.
  // B1..B3 are reset so that the first evaluation after reset, whose B2 is
  // the reset value (row 0, RegA ignored), sees no candidate.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b1 <= '0;
      b2 <= '0;
      b3 <= '0;
    end else if (in_valid) begin
      b1 <= '{c: in_cand, x: in_x, y: in_y};
      b2 <= b1;
      b3 <= b2;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) a_raw <= cbuf[b1.x[XW-1:0]];
    if (eval)     cbuf[b2.x[XW-1:0]] <= wr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) eval <= 1'b0;
    else        eval <= in_valid;
  end

  logic [SCORE_W-1:0] s1, s3, max3;
  logic               nms1, kp;

  always_comb begin
    s1   = (b1.y == b2.y) ? b1.c.score : '0;
    s3   = (b3.y == b2.y) ? b3.c.score : '0;
    max3 = b2.c.score;
    if (s1 > max3) max3 = s1;
    if (s3 > max3) max3 = s3;
    a    = (b2.y != '0) ? a_raw : '0;
    // CMPB: first suppression within the row.
    nms1 = b2.c.is_cand && (b2.c.score > s1) && (b2.c.score > s3);
    // CMPA: second suppression against the neighbouring row.
    wr.flag   = nms1 && (b2.c.score > a.max3);
    wr.orient = b2.c.orient;
    wr.score  = b2.c.score;
    wr.max3   = max3;
    kp        = a.flag && (a.score > max3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= eval && kp;
  end

  always_ff @(posedge clk) begin
    if (eval && kp) begin
      out_x      <= b2.x;
      out_y      <= b2.y - 1'b1;
      out_orient <= a.orient;
      out_score  <= a.score;
    end
  end

endmodule
