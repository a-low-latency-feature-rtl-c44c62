// orb_top: ORB feature extraction accelerator, three-scale image pyramid.
//
// The sensor stream (one pixel per cycle at most, raster order, W x H) feeds
// the detector of scale 0 directly, without a frame buffer. Each scale
// detector smooths its image into external memory, down samples it by 2/3
// for the next scale and finds oriented FAST keypoints with 3x3 NMS, which it
// queues in its keypoint buffer. One descriptor engine serves all scales: it
// fetches each keypoint's local patch from the smoothed image in external
// memory (reusing columns shared with the previous keypoint of the same row)
// and produces a 256-bit rotated BRIEF descriptor, queued in the descriptor
// buffer.
//
// External memory is outside this block: the smoothed images leave on
// sm_valid/sm_ready/sm_addr/sm_pix (one write port per scale, image of scale
// s at byte address scale_base(W, H, s), each behind a Gaussian image buffer
// of GB_DEPTH pixels that absorbs write stalls; sm_overflow reports pixels
// lost to a full buffer), and patches come back through a burst
// read port (req_* / rsp_*, responses in order, MEM_BEAT = 4 pixels per
// beat). Results leave on desc_valid/desc_ready/desc_data. Counters report
// candidates and keypoints per scale, pixels fetched, and patch fetches
// with and without reuse.
//
// The structure follows the published architecture; interface protocols,
// widths and the memory layout are this design's choices.
module orb_top
  import orb_pkg::*;
#(
  parameter int unsigned W          = 1920,
  parameter int unsigned H          = 1080,
  parameter int unsigned NS         = 3,
  parameter int unsigned TH         = 20,
  parameter int unsigned KP_DEPTH   = 512,
  parameter int unsigned GB_DEPTH   = 3840,
  parameter int unsigned R          = 22,
  parameter int unsigned DESC_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // sensor
  input  logic               pix_valid,
  input  pix_t               pix,
  // smoothed pyramid to external memory
  output logic               sm_valid [NS],
  input  logic               sm_ready [NS],
  output logic [ADDR_W-1:0]  sm_addr  [NS],
  output pix_t               sm_pix   [NS],
  output logic               sm_overflow [NS],
  // patch reads from external memory
  output logic               req_valid,
  input  logic               req_ready,
  output logic [ADDR_W-1:0]  req_addr,
  output logic [5:0]         req_len,
  input  logic               rsp_valid,
  input  beat_t              rsp_data,
  // descriptors
  output logic               desc_valid,
  input  logic               desc_ready,
  output desc_t              desc_data,
  // statistics
  output logic [31:0]        cand_count [NS],
  output logic [31:0]        kp_count   [NS],
  output logic               kp_overflow [NS],
  output logic [31:0]        fetched,
  output logic [31:0]        reuse_count,
  output logic [31:0]        full_count,
  output logic [31:0]        desc_count
);
  logic               s_valid [NS+1];
  pix_t               s_pix   [NS+1];
  logic               kp_valid [NS];
  logic               kp_ready [NS];
  kp_t                kp_data  [NS];
  logic [COORD_W-1:0] sm_rows  [NS];

  assign s_valid[0] = pix_valid;
  assign s_pix[0]   = pix;

  for (genvar s = 0; s < NS; s++) begin : g_scale
    scale_detector #(
      .W(scale_w(W, s)), .H(scale_h(H, s)), .TH(TH), .KP_DEPTH(KP_DEPTH),
      .KP_MARGIN(R + 3), .GB_DEPTH(GB_DEPTH), .BASE(scale_base(W, H, s))
    ) u_det (
      .clk, .rst_n,
      .in_valid(s_valid[s]), .in_pix(s_pix[s]),
      .sm_valid(sm_valid[s]), .sm_ready(sm_ready[s]), .sm_addr(sm_addr[s]),
      .sm_pix(sm_pix[s]), .sm_rows(sm_rows[s]), .sm_overflow(sm_overflow[s]),
      .ds_valid(s_valid[s+1]), .ds_pix(s_pix[s+1]),
      .kp_valid(kp_valid[s]), .kp_ready(kp_ready[s]), .kp_data(kp_data[s]),
      .kp_overflow(kp_overflow[s]), .cand_count(cand_count[s]),
      .kp_count(kp_count[s])
    );
  end

  descriptor_engine #(
    .W0(W), .H0(H), .NS(NS), .R(R), .DESC_DEPTH(DESC_DEPTH)
  ) u_desc (
    .clk, .rst_n,
    .kp_valid, .kp_ready, .kp_data, .sm_rows,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .desc_valid, .desc_ready, .desc_data,
    .fetched, .reuse_count, .full_count, .desc_count
  );

endmodule
