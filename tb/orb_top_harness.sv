// orb_top_harness: end-to-end check of the ORB accelerator.
//
// Streams one W x H synthetic frame (noisy background with bright and dark
// rectangles, whose corners are keypoints at every scale) into orb_top, with
// the external-memory model on its smoothed-image write ports and its patch
// read port. A reference model computed here from the frame alone builds
// the pyramid (2/3 bilinear), the smoothed images, the FAST-9 / SAD / 3x3
// NMS keypoints with the border margin, and the rotated BRIEF descriptors.
// Checks: the smoothed images in memory, the keypoint and candidate counts
// per scale, and that every descriptor out of the design belongs to a
// reference keypoint, has the reference descriptor, and that every
// reference keypoint gets one. Counts how often each mechanism happened:
// NMS suppression, keypoints at every scale, patch reuse, full patch fetch,
// the wait for smoothed rows, descriptor-buffer back-pressure, switching
// between scales, and memory write stalls absorbed by the Gaussian image
// buffers; a mechanism that never happened is a failure.
//
// FULL = 1 instantiates orb_top with no parameters (1920 x 1080); otherwise
// orb_top gets W and H.
module orb_top_harness
  import orb_pkg::*;
  import orb_ref_pkg::*;
#(
  parameter int W = 192,
  parameter int H = 144,
  parameter bit FULL = 0,
  parameter int NRECT = 12,
  parameter int WATCHDOG = 2000000
) ();
  localparam int NS = 3, R = 22, TH = 20, M = R + 3;
  localparam int MEMSZ = scale_base(W, H, NS);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pix_valid = 0;
  pix_t pix;
  logic sm_valid [NS], sm_ready [NS], sm_overflow [NS], mw_valid [NS];
  logic [ADDR_W-1:0] sm_addr [NS];
  pix_t sm_pix [NS];
  logic req_valid, req_ready, rsp_valid, desc_valid, desc_ready;
  logic [ADDR_W-1:0] req_addr;
  logic [5:0] req_len;
  beat_t rsp_data;
  desc_t desc_data;
  logic [31:0] cand_count [NS], kp_count [NS];
  logic kp_overflow [NS];
  logic [31:0] fetched, reuse_count, full_count, desc_count;
  logic waiting;

  if (FULL) begin : g_full
    orb_top dut (.*);
    assign waiting = dut.u_desc.u_fetch.state == 2'd1;
  end else begin : g_small
    orb_top #(.W(W), .H(H)) dut (.*);
    assign waiting = dut.u_desc.u_fetch.state == 2'd1;
  end

  logic [31:0] mw_addr [NS];
  logic [7:0]  mw_data [NS];
  always_comb
    for (int s = 0; s < NS; s++) begin
      mw_valid[s] = sm_valid[s] && sm_ready[s];
      mw_addr[s]  = sm_addr[s];
      mw_data[s]  = sm_pix[s];
    end

  // Memory write stalls: scale s refuses writes for 40 cycles every 3000
  // cycles, 20 times in all, so its Gaussian image buffer fills and drains.
  int wcyc = 0;
  int wstall [NS] = '{default: 0};
  always @(posedge clk) wcyc <= wcyc + 1;
  always_comb
    for (int s = 0; s < NS; s++)
      sm_ready[s] = !(wcyc / 3000 < 20 && (wcyc + 1000 * s) % 3000 < 40);
  always @(posedge clk)
    for (int s = 0; s < NS; s++)
      if (rst_n && sm_valid[s] && !sm_ready[s]) wstall[s]++;

  ext_mem_model #(.SIZE(MEMSZ), .NW(NS)) u_mem (
    .clk, .wr_valid(mw_valid), .wr_addr(mw_addr), .wr_data(mw_data),
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data
  );

  int checks = 0, failures = 0;
  int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
  int KB [5]  = '{1, 4, 6, 4, 1};

  int sw [NS], sh [NS];
  int sb [NS];                  // start of each scale in the flat arrays
  byte unsigned pyr [];         // pyramid images, scale after scale
  byte unsigned smo [];         // smoothed images (0 where not defined)
  int ref_orient [string];
  int n_cand [NS], n_kp [NS];

  function automatic int px(input int s, input int x, input int y);
    return pyr[sb[s] + y * sw[s] + x];
  endfunction

  function automatic int score(input int s, input int x, input int y);
    int v = 0, c, p;
    if (x < 3 || y < 3 || x > sw[s] - 4 || y > sh[s] - 4) return 0;
    c = px(s, x, y);
    for (int i = 0; i < 16; i++) begin
      p = px(s, x + DX[i], y + DY[i]);
      v += (p > c) ? p - c : c - p;
    end
    return v;
  endfunction

  function automatic int fast(input int s, input int x, input int y);
    int c, p;
    bit b [2][16];
    if (x < 3 || y < 3 || x > sw[s] - 4 || y > sh[s] - 4) return -1;
    c = px(s, x, y);
    for (int i = 0; i < 16; i++) begin
      p = px(s, x + DX[i], y + DY[i]);
      b[0][i] = p > c + TH;
      b[1][i] = p + TH < c;
    end
    for (int t = 0; t < 2; t++) begin
      int ones = 0;
      for (int i = 0; i < 16; i++) ones += b[t][i];
      if (ones == 16) return 0;
      for (int a = 0; a < 16; a++) begin
        int L = 0;
        if (!b[t][a] || b[t][(a + 15) % 16]) continue;
        while (b[t][(a + L) % 16]) L++;
        if (L >= 9) return (a + L - 1 - (L - 1) / 2) % 16;
      end
    end
    return -1;
  endfunction

  function automatic string key(input int s, input int x, input int y);
    return $sformatf("%0d_%0d_%0d", s, x, y);
  endfunction

  task automatic build_reference();
    for (int s = 1; s < NS; s++) begin
      sw[s] = (sw[s-1] + 2) / 3 + sw[s-1] / 3;
      sh[s] = (sh[s-1] + 1) / 3 + sh[s-1] / 3;
      for (int i = 0; i < sh[s]; i++)
        for (int j = 0; j < sw[s]; j++) begin
          int y0, x0, ny, nx, v;
          ny = (i % 2 == 0) ? 1 : 2;  nx = (j % 2 == 0) ? 1 : 2;
          y0 = (i % 2 == 0) ? 3 * (i / 2) : 3 * (i / 2) + 1;
          x0 = (j % 2 == 0) ? 3 * (j / 2) : 3 * (j / 2) + 1;
          v = 0;
          for (int a = 0; a < ny; a++) for (int b = 0; b < nx; b++) v += px(s - 1, x0 + b, y0 + a);
          pyr[sb[s] + i * sw[s] + j] = byte'((v + (ny * nx) / 2) / (ny * nx));
        end
    end
    for (int s = 0; s < NS; s++) begin
      for (int y = 3; y <= sh[s] - 4; y++)
        for (int x = 3; x <= sw[s] - 4; x++) begin
          int v = 0;
          for (int r = 0; r < 5; r++)
            for (int c = 0; c < 5; c++) v += KB[r] * KB[c] * px(s, x - 2 + c, y - 2 + r);
          smo[sb[s] + y * sw[s] + x] = byte'((v + 128) / 256);
        end
      n_cand[s] = 0;
      n_kp[s] = 0;
      for (int y = 3; y <= sh[s] - 4; y++)
        for (int x = 3; x <= sw[s] - 4; x++) begin
          int o, sc;
          bit keep;
          o = fast(s, x, y);
          if (o < 0) continue;
          n_cand[s]++;
          sc = score(s, x, y);
          keep = 1;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if ((dx != 0 || dy != 0) && score(s, x + dx, y + dy) >= sc) keep = 0;
          if (keep && x >= M && x <= sw[s] - 1 - M && y >= M && y <= sh[s] - 1 - M) begin
            ref_orient[key(s, x, y)] = o;
            n_kp[s]++;
          end
        end
    end
  endtask

  // Mechanism counters.
  int m_reuse_seen = 0, m_wait = 0, m_backpressure = 0, m_switch = 0, ndesc = 0;
  int scale_desc [NS];
  int last_s = -1;

  always @(posedge clk) begin
    if (rst_n && waiting) m_wait++;
    if (rst_n && desc_valid && !desc_ready) m_backpressure++;
    if (rst_n && desc_valid && desc_ready) begin
      kps_t k;
      string kk;
      byte unsigned patch [45][45];
      k = desc_data.kp;
      kk = key(int'(k.scale), int'(k.x), int'(k.y));
      checks++;
      if (!ref_orient.exists(kk) || ref_orient[kk] != int'(k.orient)) begin
        failures++;
        if (failures < 10) $display("unexpected keypoint %s orient %0d", kk, k.orient);
      end else begin
        int base, wid;
        base = sb[k.scale] + (int'(k.y) - R) * sw[k.scale] + int'(k.x) - R;
        wid  = sw[k.scale];
        for (int r = 0; r < 45; r++)
          for (int c = 0; c < 45; c++)
            patch[r][c] = smo[base + r * wid + c];
        checks++;
        if (desc_data.bits != ref_desc(patch, int'(k.orient))) begin
          failures++;
          if (failures < 10) $display("descriptor of %s wrong", kk);
        end
        ref_orient.delete(kk);
      end
      scale_desc[k.scale]++;
      if (last_s >= 0 && last_s != int'(k.scale)) m_switch++;
      last_s = int'(k.scale);
      ndesc++;
    end
  end

  always @(posedge clk) desc_ready <= ($urandom % 16) < 3;

  initial begin
    int total, cyc;
    sw[0] = W; sh[0] = H;
    for (int k = 0; k < NS; k++) sb[k] = scale_base(W, H, k);
    pyr = new[MEMSZ];
    smo = new[MEMSZ];
    for (int i = 0; i < W * H; i++) pyr[i] = byte'(90 + $urandom % 12);
    for (int b = 0; b < NRECT; b++) begin
      int x0, y0, rw, rh, v;
      rw = W / 12 + $urandom % (W / 6);
      rh = H / 12 + $urandom % (H / 6);
      x0 = W / 10 + $urandom % (W - W / 5 - rw);
      y0 = H / 10 + $urandom % (H - H / 5 - rh);
      v = (b % 2) ? 15 + $urandom % 30 : 190 + $urandom % 60;
      for (int y = y0; y < y0 + rh; y++)
        for (int x = x0; x < x0 + rw; x++) pyr[y * W + x] = byte'(v);
    end
    build_reference();
    total = 0;
    for (int s = 0; s < NS; s++) total += n_kp[s];
    $display("reference: %0d/%0d/%0d candidates, %0d/%0d/%0d keypoints",
             n_cand[0], n_cand[1], n_cand[2], n_kp[0], n_kp[1], n_kp[2]);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < W * H; i++) begin
      pix_valid = 1;
      pix = pix_t'(pyr[i]);
      @(negedge clk);
    end
    pix_valid = 0;
    cyc = 0;
    while (ndesc < total && cyc < 4 * total * 2500 + 1000) begin @(negedge clk); cyc++; end
    repeat (20) @(negedge clk);
    // Smoothed images in memory.
    for (int s = 0; s < NS; s++) begin
      int bad = 0;
      for (int y = 3; y <= sh[s] - 4; y++)
        for (int x = 3; x <= sw[s] - 4; x++)
          if (u_mem.mem[scale_base(W, H, s) + y * sw[s] + x] != smo[sb[s] + y * sw[s] + x]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("scale %0d: %0d smoothed pixels wrong", s, bad); end
      checks++;
      if (int'(cand_count[s]) != n_cand[s] || int'(kp_count[s]) != n_kp[s] || kp_overflow[s] || sm_overflow[s]) begin
        failures++;
        $display("scale %0d: candidates %0d/%0d keypoints %0d/%0d", s, cand_count[s], n_cand[s], kp_count[s], n_kp[s]);
      end
    end
    checks++;
    if (ref_orient.size() != 0 || ndesc != total || int'(desc_count) != total) begin
      failures++;
      $display("%0d keypoints without descriptor, %0d descriptors for %0d keypoints", ref_orient.size(), ndesc, total);
    end
    // Mechanisms.
    $display("mechanisms: nms_suppressed=%0d reuse=%0d full=%0d wait_cycles=%0d backpressure=%0d scale_switch=%0d desc_per_scale=%0d/%0d/%0d",
             n_cand[0] + n_cand[1] + n_cand[2] - total, reuse_count, full_count, m_wait,
             m_backpressure, m_switch, scale_desc[0], scale_desc[1], scale_desc[2]);
    $display("pixels fetched %0d, without reuse %0d", fetched, 45 * 45 * (reuse_count + full_count));
    $display("memory write stall cycles with pixels waiting: %0d/%0d/%0d", wstall[0], wstall[1], wstall[2]);
    checks += 7;
    if (wstall[0] == 0 || wstall[1] == 0 || wstall[2] == 0) begin
      failures++; $display("a Gaussian image buffer never held pixels back");
    end
    if (n_cand[0] + n_cand[1] + n_cand[2] <= total) begin failures++; $display("NMS never suppressed"); end
    if (reuse_count == 0) begin failures++; $display("no patch reuse"); end
    if (full_count == 0) begin failures++; $display("no full fetch"); end
    if (m_wait == 0) begin failures++; $display("never waited for rows"); end
    if (m_backpressure == 0) begin failures++; $display("no descriptor back-pressure"); end
    if (m_switch == 0 || scale_desc[0] == 0 || scale_desc[1] == 0 || scale_desc[2] == 0) begin
      failures++; $display("not all scales served");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
