// scale_detector: keypoint detection pipeline of one pyramid scale.
//
// Pixels of this scale arrive in raster order, at most one per cycle. They go
// through the row bank buffer into a 7x7 register file; from that window
//  * the binomial smoother produces the smoothed image, which queues in the
//    Gaussian image buffer and is written to external memory (sm_valid /
//    sm_ready / sm_addr / sm_pix, one byte per pixel, row-major from address
//    BASE) for the descriptor stage;
//  * the bilinear down sampler produces the input stream of the next scale
//    (ds_valid / ds_pix);
//  * oFAST tests every pixel, and the 3x3 NMS keeps the local maxima, which
//    are written to the keypoint buffer (a FIFO read through kp_*).
// Everything runs at the pixel rate with no stall: a full keypoint buffer
// drops keypoints and sets kp_overflow, and a full Gaussian image buffer
// (memory writes held off too long) loses pixels and sets sm_overflow.
//
// Coordinates: the window centre is 3 columns and 3 rows behind the newest
// pixel. Smoothed pixels exist for centres with 3 <= x <= W-4 and
// 3 <= y <= H-4; sm_rows counts the smoothed rows of the current frame that
// are completely written to memory, so the descriptor stage knows which rows
// it can read.
// Keypoints closer than KP_MARGIN to the image border are not stored, so that
// the rotated sampling patch (radius 22) lies inside the smoothed image.
// cand_count and kp_count count FAST candidates and stored keypoints.
//
// The chain of blocks follows the published architecture (the part that is
// duplicated per scale). The window size, the border rules, the memory
// layout and the pixel-rate, no-stall behaviour are this design's choices.
module scale_detector
  import orb_pkg::*;
#(
  parameter int unsigned W         = 1920,
  parameter int unsigned H         = 1080,
  parameter int unsigned TH        = 20,
  parameter int unsigned KP_DEPTH  = 512,
  parameter int unsigned KP_MARGIN = 25,
  parameter int unsigned GB_DEPTH  = 3840,
  parameter int unsigned BASE      = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 in_pix,
  // smoothed image to external memory
  output logic                 sm_valid,
  input  logic                 sm_ready,
  output logic [ADDR_W-1:0]    sm_addr,
  output pix_t                 sm_pix,
  output logic [COORD_W-1:0]   sm_rows,
  output logic                 sm_overflow,
  // next scale
  output logic                 ds_valid,
  output pix_t                 ds_pix,
  // keypoint buffer read side
  output logic                 kp_valid,
  input  logic                 kp_ready,
  output kp_t                  kp_data,
  output logic                 kp_overflow,
  output logic [31:0]          cand_count,
  output logic [31:0]          kp_count
);
  pix_t               col [7];
  logic               col_valid;
  logic [COORD_W-1:0] col_x, col_y;

  row_bank_buffer #(.W(W), .H(H), .NBANKS(6)) u_rows (
    .clk, .rst_n, .in_valid, .in_pix,
    .col_valid, .col, .col_x, .col_y
  );

  pix_t               win [7][7];
  logic               win_valid;
  logic [COORD_W-1:0] win_x, win_y;

  window_regfile #(.N(7)) u_win (
    .clk, .rst_n, .col_valid, .col, .col_x, .col_y,
    .win_valid, .win, .win_x, .win_y
  );

  logic inner;
  assign inner = (win_x >= COORD_W'(6)) && (win_y >= COORD_W'(6));

  // Smoothing of the window centre.
  pix_t               w5 [5][5];
  logic               s_valid;
  pix_t               s_pix;
  logic [COORD_W-1:0] s_x, s_y;
  always_comb
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) w5[r][c] = win[r+1][c+1];

  binomial_smoother u_smooth (
    .clk, .rst_n, .in_valid(win_valid && inner), .w(w5),
    .in_x(win_x - COORD_W'(3)), .in_y(win_y - COORD_W'(3)),
    .out_valid(s_valid), .out_pix(s_pix), .out_x(s_x), .out_y(s_y)
  );

  gaussian_buffer #(.W(W), .H(H), .DEPTH(GB_DEPTH), .BASE(BASE)) u_gbuf (
    .clk, .rst_n, .in_valid(s_valid), .in_pix(s_pix),
    .wr_valid(sm_valid), .wr_ready(sm_ready), .wr_addr(sm_addr), .wr_data(sm_pix),
    .rows_done(sm_rows), .overflow(sm_overflow)
  );

  // Down sampling for the next scale.
  pix_t q [2][2];
  always_comb
    for (int r = 0; r < 2; r++)
      for (int c = 0; c < 2; c++) q[r][c] = win[r][c];

  bilinear_downsampler u_ds (
    .clk, .rst_n, .in_valid(win_valid), .q, .in_x(win_x), .in_y(win_y),
    .out_valid(ds_valid), .out_pix(ds_pix)
  );

  // Detection.
  logic               f_valid;
  cand_t              f_cand;
  logic [COORD_W-1:0] f_x, f_y;

  ofast #(.TH(TH)) u_fast (
    .clk, .rst_n, .in_valid(win_valid), .inner, .w(win),
    .in_x(win_x), .in_y(win_y),
    .out_valid(f_valid), .out_cand(f_cand), .out_x(f_x), .out_y(f_y)
  );

  logic                n_valid;
  logic [COORD_W-1:0]  n_x, n_y;
  logic [ORIENT_W-1:0] n_orient;
  logic [SCORE_W-1:0]  n_score;

  nms3x3 #(.W(W)) u_nms (
    .clk, .rst_n, .in_valid(f_valid), .in_cand(f_cand), .in_x(f_x), .in_y(f_y),
    .out_valid(n_valid), .out_x(n_x), .out_y(n_y), .out_orient(n_orient),
    .out_score(n_score)
  );

  // Keypoint position is the window centre of the NMS winner.
  logic [COORD_W-1:0] kx, ky;
  logic               k_in;
  assign kx   = n_x - COORD_W'(3);
  assign ky   = n_y - COORD_W'(3);
  assign k_in = n_valid &&
                kx >= COORD_W'(KP_MARGIN) && kx <= COORD_W'(W - 1 - KP_MARGIN) &&
                ky >= COORD_W'(KP_MARGIN) && ky <= COORD_W'(H - 1 - KP_MARGIN);

  logic                        kp_wr_ready;
  logic [$clog2(KP_DEPTH):0]   kp_fill;

  sync_fifo #(.WIDTH($bits(kp_t)), .DEPTH(KP_DEPTH)) u_kpbuf (
    .clk, .rst_n,
    .wr_valid(k_in), .wr_ready(kp_wr_ready),
    .wr_data({kx, ky, n_orient}),
    .rd_valid(kp_valid), .rd_ready(kp_ready), .rd_data(kp_data),
    .count(kp_fill), .overflow(kp_overflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_count <= '0;
      kp_count   <= '0;
    end else begin
      if (f_valid && f_cand.is_cand) cand_count <= cand_count + 1'b1;
      if (k_in && kp_wr_ready)       kp_count   <= kp_count + 1'b1;
    end
  end

endmodule
