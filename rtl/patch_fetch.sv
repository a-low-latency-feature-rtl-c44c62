// patch_fetch: fetches the local patch of a keypoint from external memory,
// reusing the columns it shares with the previous keypoint.
//
// The patch of keypoint (x, y) covers columns x-R..x+R and rows y-R..y+R of
// the smoothed image of its scale. Keypoints leave NMS row by row, so the
// next keypoint of the same scale and row often lies only d = x - x0 < 2R+1
// columns to the right of the previous one (x0). Then only the d new columns
// x0+R+1..x+R are fetched, a d x (2R+1) region; the other columns stay in the
// patch buffer. The buffer's columns are circular: ptr is the physical column
// of the patch's left edge. New columns overwrite the d physical columns
// starting at the old pointer, wrapping at the buffer edge, and the new
// pointer is ptr0 + d (minus 2R+1 if that passes the edge). Any other
// keypoint fetches the full patch with ptr = 0.
//
// Sequence: a keypoint is accepted on in_valid/in_ready; the controller
// waits until the smoothed row y+R of that scale is in memory
// (sm_rows[scale] > y+R), then issues 2R+1 read bursts of n pixels, one per
// patch row (req_valid/req_ready, byte address, length). The memory answers
// each burst with ceil(n / MEM_BEAT) beats (rsp_valid, in request order);
// beat i carries pixels addr + MEM_BEAT*i .. addr + MEM_BEAT*i + MEM_BEAT-1,
// and the lanes past the end of the burst are ignored. All valid lanes of a
// beat are written into the patch buffer in the same cycle, one write lane
// each. done pulses with the pointer when the last pixel is written.
// fetched counts pixels read from memory; reuse_count and full_count count
// the two kinds of fetch.
//
// The reuse rule, the circular pointer update and the d x (2R+1) fetch region
// follow the published design, and so does writing a whole memory transfer
// into the banked patch buffer at once. The burst-per-row memory interface,
// the beat width, the wait for the smoothed rows and the memory layout of
// the scales are this design's choices.
module patch_fetch
  import orb_pkg::*;
#(
  parameter int unsigned W0 = 1920,
  parameter int unsigned H0 = 1080,
  parameter int unsigned NS = 3,
  parameter int unsigned R  = 22
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  kps_t               in_kp,
  input  logic [COORD_W-1:0] sm_rows [NS],
  // external memory read port
  output logic               req_valid,
  input  logic               req_ready,
  output logic [ADDR_W-1:0]  req_addr,
  output logic [5:0]         req_len,
  input  logic               rsp_valid,
  input  beat_t              rsp_data,
  // patch buffer write port, one lane per pixel of the beat
  output logic               pb_we   [MEM_BEAT],
  output logic [5:0]         pb_row,
  output logic [5:0]         pb_col  [MEM_BEAT],
  output beat_t              pb_data,
  // completion
  output logic               done,
  output logic [5:0]         ptr,
  output logic [31:0]        fetched,
  output logic [31:0]        reuse_count,
  output logic [31:0]        full_count
);
  localparam int unsigned N = 2 * R + 1;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_FETCH} state_t;
  state_t state;

  kps_t              prev;
  logic              prev_ok;
  kps_t              cur;
  logic [5:0]        n;          // columns to fetch
  logic [5:0]        wbase;      // physical column of the first fetched column
  logic [5:0]        req_row, rsp_row, rsp_col;
  logic [ADDR_W-1:0] row_addr;
  logic [ADDR_W-1:0] row_step;

  // Per-scale image width and memory base.
  function automatic logic [ADDR_W-1:0] sw(input logic [SCALE_W-1:0] s);
    logic [ADDR_W-1:0] r = ADDR_W'(W0);
    for (int k = 0; k < NS; k++) if (k == int'(s)) r = ADDR_W'(scale_w(W0, k));
    return r;
  endfunction
  function automatic logic [ADDR_W-1:0] sbase(input logic [SCALE_W-1:0] s);
    logic [ADDR_W-1:0] r = '0;
    for (int k = 0; k < NS; k++) if (k == int'(s)) r = ADDR_W'(scale_base(W0, H0, k));
    return r;
  endfunction

  // Reuse decision for the offered keypoint.
  logic [COORD_W-1:0] d;
  logic               reuse;
  logic [6:0]         ptr_sum;
  assign d       = in_kp.x - prev.x;
  assign reuse   = prev_ok && in_kp.scale == prev.scale && in_kp.y == prev.y &&
                   in_kp.x > prev.x && d < COORD_W'(N);
  assign ptr_sum = 7'(ptr) + 7'(d);

  logic [6:0] nleft;              // pixels of the row still to come
  logic [2:0] nlanes;             // valid lanes in this beat

  logic rows_ready;
  always_comb begin
    rows_ready = 1'b0;
    for (int k = 0; k < NS; k++)
      if (k == int'(cur.scale)) rows_ready = sm_rows[k] > cur.y + COORD_W'(R);
  end

  assign in_ready  = (state == S_IDLE);
  assign req_valid = (state == S_FETCH) && (req_row != 6'(N));
  assign req_addr  = row_addr;
  assign req_len   = n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      prev        <= '0;
      prev_ok     <= 1'b0;
      cur         <= '0;
      n           <= '0;
      wbase       <= '0;
      ptr         <= '0;
      req_row     <= '0;
      rsp_row     <= '0;
      rsp_col     <= '0;
      row_addr    <= '0;
      row_step    <= '0;
      done        <= 1'b0;
      fetched     <= '0;
      reuse_count <= '0;
      full_count  <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (in_valid) begin
          cur     <= in_kp;
          prev    <= in_kp;
          prev_ok <= 1'b1;
          if (reuse) begin
            n           <= 6'(d);
            wbase       <= ptr;
            ptr         <= (ptr_sum >= 7'(N)) ? 6'(ptr_sum - 7'(N)) : 6'(ptr_sum);
            reuse_count <= reuse_count + 1'b1;
          end else begin
            n          <= 6'(N);
            wbase      <= '0;
            ptr        <= '0;
            full_count <= full_count + 1'b1;
          end
          state <= S_WAIT;
        end
        S_WAIT: if (rows_ready) begin
          // First burst: row y-R, starting at column x+R-n+1.
          row_addr <= sbase(cur.scale)
                    + ADDR_W'(cur.y - COORD_W'(R)) * sw(cur.scale)
                    + ADDR_W'(cur.x) + ADDR_W'(R + 1) - ADDR_W'(n);
          row_step <= sw(cur.scale);
          req_row  <= '0;
          rsp_row  <= '0;
          rsp_col  <= '0;
          state    <= S_FETCH;
        end
        S_FETCH: begin
          if (req_valid && req_ready) begin
            req_row  <= req_row + 1'b1;
            row_addr <= row_addr + row_step;
          end
          if (rsp_valid) begin
            fetched <= fetched + 32'(nlanes);
            if (7'(rsp_col) + 7'(MEM_BEAT) >= 7'(n)) begin
              rsp_col <= '0;
              rsp_row <= rsp_row + 1'b1;
              if (rsp_row == 6'(N - 1)) begin
                done  <= 1'b1;
                state <= S_IDLE;
              end
            end else begin
              rsp_col <= rsp_col + 6'(MEM_BEAT);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Patch buffer write of each valid lane of the returned beat.
  assign nleft  = 7'(n) - 7'(rsp_col);
  assign nlanes = (nleft >= 7'(MEM_BEAT)) ? 3'(MEM_BEAT) : 3'(nleft);
  always_comb begin
    for (int j = 0; j < MEM_BEAT; j++) begin
      logic [6:0] pcol;
      pcol      = 7'(wbase) + 7'(rsp_col) + 7'(j);
      pb_we[j]  = (state == S_FETCH) && rsp_valid && 3'(j) < nlanes;
      pb_col[j] = (pcol >= 7'(N)) ? 6'(pcol - 7'(N)) : 6'(pcol);
    end
  end
  assign pb_row  = rsp_row;
  assign pb_data = rsp_data;

  // Memory responses only arrive while a fetch is in progress.
  a_rsp_in_fetch: assert property (@(posedge clk) disable iff (!rst_n)
                                   rsp_valid |-> state == S_FETCH);

endmodule
