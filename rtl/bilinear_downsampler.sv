// bilinear_downsampler: 2/3 down sampling by bilinear interpolation.
//
// Within every 3x3 block of input pixels p[i][j] (i row, j column, 0..2) two
// output rows and two output columns are produced, at input positions 0 and
// 1.5: out00 = p00, out01 = (p01+p02)/2, out10 = (p10+p20)/2 and
// out11 = (p11+p12+p21+p22)/4, rounded to nearest. The block works from the
// 2x2 corner of the register-file window holding the newest pixel (x, y) and
// its left, upper and upper-left neighbours: the first output row of a block
// is emitted while input row y = 3k+1 streams in, the second while row 3k+2
// streams in, so there is at most one output pixel per input pixel and the
// output stream is in raster order. An input W x H image gives
// ds_cols(W) x ds_rows(H) output pixels (1920x1080 -> 1280x720 -> 853x480).
//
// Interface: in_valid with the 2x2 corner (q[r][c] = row y-r, column x-c) and
// (x, y); out_valid pulses one cycle later with the output pixel. The scale
// factor 2/3 and bilinear interpolation follow the published design; the
// sampling phase and rounding are this design's choices.
module bilinear_downsampler
  import orb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 q [2][2],
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  output logic                 out_valid,
  output pix_t                 out_pix
);
  logic [1:0] xm_c, ym_c;   // x mod 3, y mod 3
  logic       emit;
  pix_t       val;

  // in_x mod 3 and in_y mod 3 computed directly (coordinates are < 2048).
  always_comb begin
    logic [COORD_W-1:0] tx, ty;
    tx = in_x % COORD_W'(3);
    ty = in_y % COORD_W'(3);
    xm_c = tx[1:0];
    ym_c = ty[1:0];
  end

  always_comb begin
    emit = 1'b0;
    val  = '0;
    if (ym_c == 2'd1) begin
      // Output row from input row y-1 (row 0 of the block).
      if (xm_c == 2'd0) begin
        emit = 1'b1;
        val  = q[1][0];
      end else if (xm_c == 2'd2) begin
        emit = 1'b1;
        val  = pix_t'((9'(q[1][1]) + 9'(q[1][0]) + 9'd1) >> 1);
      end
    end else if (ym_c == 2'd2) begin
      // Output row from input rows y-1 and y (rows 1 and 2 of the block).
      if (xm_c == 2'd0) begin
        emit = 1'b1;
        val  = pix_t'((9'(q[1][0]) + 9'(q[0][0]) + 9'd1) >> 1);
      end else if (xm_c == 2'd2) begin
        emit = 1'b1;
        val  = pix_t'((10'(q[1][1]) + 10'(q[1][0]) + 10'(q[0][1]) + 10'(q[0][0]) + 10'd2) >> 2);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && emit) out_pix <= val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && emit;
  end

endmodule
