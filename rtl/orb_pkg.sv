// orb_pkg: types, constants and constant functions shared by the ORB feature
// extraction accelerator.
//
// Sizes that follow the published design: 1920x1080 source, three scales with a
// scale factor of 2/3, FAST-9 on a 16-pixel ring of radius 3, 256-bit rBRIEF
// descriptors. Sizes chosen by this design: the 12-bit sum-of-absolute-difference
// score, the 4-bit orientation (one of the 16 ring positions), the external
// memory read beat of four pixels, the Q7 sine and cosine table, and the
// sampling pattern, which is a fixed pseudo-random set of 256 point pairs
// inside a radius-15 disc generated by a hash (the learned ORB pattern is not
// reproduced here). Also defined: the ring geometry, the
// per-scale image sizes and the record formats passed between blocks.
package orb_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned SCORE_W  = 12;   // 16 * 255 fits in 12 bits
  localparam int unsigned ORIENT_W = 4;    // ring position 0..15
  localparam int unsigned COORD_W  = 11;   // up to 2047
  localparam int unsigned SCALE_W  = 2;
  localparam int unsigned ADDR_W   = 32;
  localparam int unsigned NPAIRS   = 256;
  localparam int unsigned MEM_BEAT = 4;    // pixels per external memory read beat

  typedef logic [PIX_W-1:0] pix_t;
  // One read beat of the external memory: pixel j of the beat is beat[j].
  typedef logic [MEM_BEAT-1:0][PIX_W-1:0] beat_t;

  // Ring of 16 pixels around the centre, index 0 straight above the centre,
  // then clockwise (x to the right, y downwards).
  function automatic int ring_dx(input int i);
    case (i)
      0: return 0;   1: return 1;   2: return 2;   3: return 3;
      4: return 3;   5: return 3;   6: return 2;   7: return 1;
      8: return 0;   9: return -1; 10: return -2; 11: return -3;
      12: return -3; 13: return -3; 14: return -2; default: return -1;
    endcase
  endfunction

  function automatic int ring_dy(input int i);
    return ring_dx((i + 12) % 16);
  endfunction

  // Output size of the 2/3 down sampler for an input size n: it emits one
  // sample for every index congruent to 0 and one for every index congruent
  // to 2 modulo 3.
  function automatic int ds_cols(input int n);
    return (n + 2) / 3 + n / 3;
  endfunction
  function automatic int ds_rows(input int n);
    return (n + 1) / 3 + n / 3;
  endfunction

  function automatic int scale_w(input int w0, input int s);
    int w = w0;
    for (int k = 0; k < s; k++) w = ds_cols(w);
    return w;
  endfunction
  function automatic int scale_h(input int h0, input int s);
    int h = h0;
    for (int k = 0; k < s; k++) h = ds_rows(h);
    return h;
  endfunction
  // Start address of the smoothed image of scale s in external memory; the
  // scales are stored back to back, row-major, one byte per pixel.
  function automatic int scale_base(input int w0, input int h0, input int s);
    int b = 0;
    for (int k = 0; k < s; k++) b += scale_w(w0, k) * scale_h(h0, k);
    return b;
  endfunction

  // cos(k * 22.5 deg) * 128, rounded, for k = 0..15.
  function automatic int cos_q7(input int k);
    int t[5];
    int m;
    t = '{128, 118, 91, 49, 0};
    m = k % 16;
    if (m <= 4)  return  t[m];
    if (m <= 8)  return -t[8 - m];
    if (m <= 12) return -t[m - 8];
    return t[16 - m];
  endfunction
  function automatic int sin_q7(input int k);
    return cos_q7((k + 12) % 16);
  endfunction

  // Sampling pattern: coordinate c (0: x1, 1: y1, 2: x2, 3: y2) of pair i,
  // a value in -15..15 from an integer hash, redrawn until the point lies in
  // the disc of radius 15.
  function automatic int unsigned pat_hash(input int unsigned v);
    int unsigned h = v * 32'h9E3779B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EBCA77;
    h = h ^ (h >> 13);
    return h;
  endfunction
  function automatic int pat_coord(input int i, input int c);
    int px, py;
    int unsigned seed;
    int pt = c / 2;
    seed = (i * 2 + pt) * 16;
    for (int tries = 0; tries < 16; tries++) begin
      px = int'(pat_hash(seed + tries * 2) % 31) - 15;
      py = int'(pat_hash(seed + tries * 2 + 1) % 31) - 15;
      if (px * px + py * py <= 225) break;
    end
    if (px * px + py * py > 225) begin px = 0; py = 0; end
    return (c % 2 == 0) ? px : py;
  endfunction

  // Output of oFAST for every stream position.
  typedef struct packed {
    logic                is_cand;
    logic [ORIENT_W-1:0] orient;
    logic [SCORE_W-1:0]  score;
  } cand_t;

  // Keypoint record written to the keypoint buffer.
  typedef struct packed {
    logic [COORD_W-1:0]  x;
    logic [COORD_W-1:0]  y;
    logic [ORIENT_W-1:0] orient;
  } kp_t;

  // Keypoint with its scale, as seen by the descriptor engine.
  typedef struct packed {
    logic [SCALE_W-1:0]  scale;
    logic [COORD_W-1:0]  x;
    logic [COORD_W-1:0]  y;
    logic [ORIENT_W-1:0] orient;
  } kps_t;

  // Descriptor record: keypoint plus 256 comparison bits.
  typedef struct packed {
    kps_t              kp;
    logic [NPAIRS-1:0] bits;
  } desc_t;

endpackage
