// ofast: oriented FAST-9 keypoint test with SAD score, four-cycle pipeline.
//
// For the window centre c and its 16 ring pixels p[i] (radius 3, index 0
// above the centre, clockwise) two test strings are formed: dark[i] = 1 when
// p[i] > c + TH (centre darker than the ring pixel by more than the
// threshold) and bright[i] = 1 when p[i] + TH < c. Each string is searched
// for 9 cyclically contiguous ones by string searching: the upper 9 bits form
// the test domain; if the domain is all ones the pixel is a keypoint,
// otherwise the string is rotated left so that the bit just below the
// rightmost zero of the domain becomes the top bit. A zero eliminates every
// window that covers it, so four such steps cover all 16 start positions;
// one step is done per pipeline stage for both strings in parallel.
//
// Orientation is the ring index of the middle pixel of the detected arc: the
// arc is the longest run of ones containing the detected domain (for an even
// length the upper of the two middle pixels, counting in ring order; an
// all-ones ring gives 0). Score is the sum of absolute differences between
// the 16 ring pixels and the centre, accumulated by an adder tree along the
// same four stages. It is produced for every pixel, candidate or not.
//
// Interface: one window per in_valid (w[r][c] = row y-r, column x-c, centre
// w[3][3]), inner = 1 when the whole ring lies inside the image; exactly four
// cycles later out_valid with the cand_t result and the stream position of
// the input. Pixels with inner = 0 give is_cand = 0 and score 0.
//
// The comparators, the string search with a 9-bit test domain, the
// four-cycle pipeline, the middle-of-arc orientation and the SAD score follow
// the published design. The threshold value, the tie rule for even arc
// lengths and the all-ones case are this design's choices.
module ofast
  import orb_pkg::*;
#(
  parameter int unsigned TH = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 inner,
  input  pix_t                 w [7][7],
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  output logic                 out_valid,
  output cand_t                out_cand,
  output logic [COORD_W-1:0]   out_x,
  output logic [COORD_W-1:0]   out_y
);
  // State of one string search.
  typedef struct packed {
    logic [15:0] s;       // string rotated so bit 15 is ring pixel 'top'
    logic [3:0]  top;
    logic        found;
  } srch_t;

  // Stage record.
  typedef struct packed {
    logic               valid;
    logic               inner;
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    srch_t              dk;
    srch_t              br;
  } stage_t;

  // One string-search step.
  function automatic srch_t step(input srch_t a);
    srch_t n;
    logic [4:0] sh;
    n  = a;
    sh = '0;
    if (!a.found) begin
      if (&a.s[15:7]) begin
        n.found = 1'b1;
      end else begin
        // Rightmost zero of the test domain: lowest p in 7..15 with s[p] = 0.
        for (int p = 15; p >= 7; p--) begin
          if (!a.s[p]) sh = 5'(16 - p);
        end
        n.s   = (a.s << sh[3:0]) | (a.s >> (5'd16 - sh));
        n.top = a.top - sh[3:0];
      end
    end
    return n;
  endfunction

  // Middle of the arc of ones that contains the 9-bit domain at the top of r.
  function automatic logic [3:0] arc_middle(input logic [15:0] r, input logic [3:0] top);
    logic [4:0] down, up, len;
    logic [3:0] start;
    logic       stop;
    if (&r) return 4'd0;
    down = '0;
    stop = 1'b0;
    for (int j = 15; j >= 0; j--) begin
      if (!stop && r[j]) down = down + 1'b1;
      else stop = 1'b1;
    end
    up   = '0;
    stop = 1'b0;
    for (int j = 0; j < 16; j++) begin
      if (!stop && r[j]) up = up + 1'b1;
      else stop = 1'b1;
    end
    len   = down + up;
    start = top + up[3:0];
    return start - 4'((len - 5'd1) >> 1);
  endfunction

  pix_t ctr;
  pix_t ring [16];
  always_comb begin
    ctr = w[3][3];
    for (int i = 0; i < 16; i++) ring[i] = w[3 - ring_dy(i)][3 - ring_dx(i)];
  end

  // Stage 1 inputs: comparators and absolute differences.
  stage_t st0, st1, st2, st3, st4;
  logic [7:0]  ad0 [16];
  logic [9:0]  ps2 [4];
  logic [11:0] sad3, sad4;

  always_comb begin
    st0.valid    = in_valid;
    st0.inner    = inner;
    st0.x        = in_x;
    st0.y        = in_y;
    st0.dk.top   = 4'd15;
    st0.br.top   = 4'd15;
    st0.dk.found = 1'b0;
    st0.br.found = 1'b0;
    for (int i = 0; i < 16; i++) begin
      st0.dk.s[i] = 9'(ring[i]) > 9'(ctr) + 9'(TH);
      st0.br.s[i] = 9'(ring[i]) + 9'(TH) < 9'(ctr);
    end
  end

  function automatic stage_t adv(input stage_t a);
    stage_t n = a;
    n.dk = step(a.dk);
    n.br = step(a.br);
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st1 <= '0; st2 <= '0; st3 <= '0; st4 <= '0;
    end else begin
      st1 <= adv(st0);
      st2 <= adv(st1);
      st3 <= adv(st2);
      st4 <= adv(st3);
    end
  end

  // SAD adder tree alongside the search stages.
  always_ff @(posedge clk) begin
    for (int i = 0; i < 16; i++)
      ad0[i] <= (ring[i] > ctr) ? ring[i] - ctr : ctr - ring[i];
    for (int g = 0; g < 4; g++)
      ps2[g] <= 10'(ad0[4*g]) + 10'(ad0[4*g+1]) + 10'(ad0[4*g+2]) + 10'(ad0[4*g+3]);
    sad3 <= 12'(ps2[0]) + 12'(ps2[1]) + 12'(ps2[2]) + 12'(ps2[3]);
    sad4 <= sad3;
  end

  // Output: the fourth step result is registered in st4.
  always_comb begin
    out_valid = st4.valid;
    out_x     = st4.x;
    out_y     = st4.y;
    out_cand.is_cand = st4.inner && (st4.dk.found || st4.br.found);
    out_cand.score   = st4.inner ? sad4 : '0;
    if (st4.dk.found) out_cand.orient = arc_middle(st4.dk.s, st4.dk.top);
    else              out_cand.orient = arc_middle(st4.br.s, st4.br.top);
  end

endmodule
