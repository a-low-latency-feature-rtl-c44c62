// descriptor_engine: descriptor generation for the keypoints of all scales.
//
// The keypoint buffers of the NS scales are served one keypoint at a time.
// The arbiter keeps to the scale of the previous keypoint while its buffer
// has entries (consecutive keypoints of one row are what the patch reuse
// needs) and otherwise takes the lowest-numbered non-empty scale. For each
// keypoint the patch fetch controller loads the local patch (or the new
// columns of it) from external memory into the patch buffer, rBRIEF then
// produces the 256-bit descriptor, and the keypoint with its descriptor is
// pushed into the descriptor buffer, read through desc_*. A keypoint is only
// taken when the descriptor buffer has room, so nothing is lost here.
//
// Timing per keypoint: the wait for the smoothed rows, (2R+1) bursts of d or
// 2R+1 pixels at MEM_BEAT pixels per cycle, then 130 cycles of rBRIEF and one to
// push the result.
//
// The sequence fetch -> rBRIEF -> descriptor buffer and the sharing of one
// descriptor unit by all scales follow the published design. The arbitration
// rule, the one-keypoint-at-a-time sequencing and the descriptor buffer depth
// (64 entries, about the published 18.4 kbit) are this design's choices.
module descriptor_engine
  import orb_pkg::*;
#(
  parameter int unsigned W0         = 1920,
  parameter int unsigned H0         = 1080,
  parameter int unsigned NS         = 3,
  parameter int unsigned R          = 22,
  parameter int unsigned DESC_DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // keypoint buffers
  input  logic               kp_valid [NS],
  output logic               kp_ready [NS],
  input  kp_t                kp_data  [NS],
  input  logic [COORD_W-1:0] sm_rows  [NS],
  // external memory read port
  output logic               req_valid,
  input  logic               req_ready,
  output logic [ADDR_W-1:0]  req_addr,
  output logic [5:0]         req_len,
  input  logic               rsp_valid,
  input  beat_t              rsp_data,
  // descriptor output
  output logic               desc_valid,
  input  logic               desc_ready,
  output desc_t              desc_data,
  // statistics
  output logic [31:0]        fetched,
  output logic [31:0]        reuse_count,
  output logic [31:0]        full_count,
  output logic [31:0]        desc_count
);
  typedef enum logic [1:0] {E_IDLE, E_FETCH, E_BRIEF, E_PUSH} estate_t;
  estate_t state;

  logic [SCALE_W-1:0] last_scale, pick;
  logic               any;
  kps_t               cur;

  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int s = NS - 1; s >= 0; s--) begin
      if (kp_valid[s]) begin
        any  = 1'b1;
        pick = SCALE_W'(s);
      end
    end
    for (int s = 0; s < NS; s++)
      if (kp_valid[s] && SCALE_W'(s) == last_scale) pick = last_scale;
  end

  logic  f_in_valid, f_in_ready, f_done;
  kps_t  f_kp;
  logic  pb_we [MEM_BEAT];
  logic [5:0] pb_row, ptr;
  logic [5:0] pb_col [MEM_BEAT];
  beat_t pb_wdata;
  logic  df_wr_ready;
  logic [$clog2(DESC_DEPTH):0] df_count;
  logic  df_overflow;

  assign f_kp       = '{scale: pick, x: kp_data[pick].x, y: kp_data[pick].y,
                        orient: kp_data[pick].orient};
  assign f_in_valid = (state == E_IDLE) && any && df_wr_ready;

  always_comb
    for (int s = 0; s < NS; s++)
      kp_ready[s] = f_in_valid && f_in_ready && (SCALE_W'(s) == pick);

  patch_fetch #(.W0(W0), .H0(H0), .NS(NS), .R(R)) u_fetch (
    .clk, .rst_n,
    .in_valid(f_in_valid), .in_ready(f_in_ready), .in_kp(f_kp), .sm_rows,
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data,
    .pb_we, .pb_row, .pb_col, .pb_data(pb_wdata),
    .done(f_done), .ptr, .fetched, .reuse_count, .full_count
  );

  logic       b_start, b_busy, b_done, pb_re;
  logic [5:0] pb_rrow [4], pb_rcol [4];
  pix_t       pb_rdata [4];
  logic [NPAIRS-1:0] bits;

  patch_buffer #(.R(R), .NRD(4)) u_patch (
    .clk, .we(pb_we), .wrow(pb_row), .wcol(pb_col), .wdata(pb_wdata),
    .re(pb_re), .rrow(pb_rrow), .rcol(pb_rcol), .rdata(pb_rdata)
  );

  assign b_start = (state == E_FETCH) && f_done;

  rbrief #(.R(R)) u_brief (
    .clk, .rst_n, .start(b_start), .orient(cur.orient), .ptr, .busy(b_busy),
    .pb_re, .pb_rrow, .pb_rcol, .pb_rdata, .done(b_done), .desc(bits)
  );

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(DESC_DEPTH)) u_descbuf (
    .clk, .rst_n,
    .wr_valid(state == E_PUSH), .wr_ready(df_wr_ready),
    .wr_data({cur, bits}),
    .rd_valid(desc_valid), .rd_ready(desc_ready), .rd_data(desc_data),
    .count(df_count), .overflow(df_overflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= E_IDLE;
      last_scale <= '0;
      cur        <= '0;
      desc_count <= '0;
    end else begin
      case (state)
        E_IDLE: if (f_in_valid && f_in_ready) begin
          cur        <= f_kp;
          last_scale <= pick;
          state      <= E_FETCH;
        end
        E_FETCH: if (f_done) state <= E_BRIEF;
        E_BRIEF: if (b_done) state <= E_PUSH;
        E_PUSH: begin
          desc_count <= desc_count + 1'b1;
          state      <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // Room was checked before the keypoint was taken.
  a_no_desc_loss: assert property (@(posedge clk) disable iff (!rst_n)
                                   state == E_PUSH |-> df_wr_ready);

endmodule
