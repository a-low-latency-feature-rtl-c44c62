// tb_scale_detector: self-checking testbench of one scale's detection chain.
//
// Streams two frames of a synthetic W x H image (a noisy background with
// bright and dark rectangles, whose corners are FAST keypoints) into the
// detector with random idle cycles, and checks against models computed
// here from the image alone:
//  * every smoothed pixel written to memory (address and value of the 5x5
//    binomial filter) for centres 3..W-4 x 3..H-4, with the memory refusing
//    writes at random; sm_rows never runs ahead of the rows written, ends at
//    H-3, and the Gaussian image buffer never overflows;
//  * the down-sampled stream (2/3 bilinear, ds_cols x ds_rows samples);
//  * the keypoints in the keypoint buffer, in raster order, with their
//    orientation: FAST-9 with threshold TH, SAD score, strict maximum over
//    the 8 neighbours, and the border margin;
//  * the candidate and keypoint counters.
module tb_scale_detector;
  import orb_pkg::*;
  localparam int W = 64, H = 48, TH = 20, M = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  pix_t in_pix;
  logic sm_valid, sm_ready = 0, sm_overflow, ds_valid, kp_valid, kp_ready, kp_overflow;
  logic [ADDR_W-1:0] sm_addr;
  pix_t sm_pix, ds_pix;
  logic [COORD_W-1:0] sm_rows;
  kp_t kp_data;
  logic [31:0] cand_count, kp_count;

  scale_detector #(.W(W), .H(H), .TH(TH), .KP_DEPTH(64), .KP_MARGIN(M), .GB_DEPTH(128),
                   .BASE(1000)) dut (.*);

  int checks = 0, failures = 0;
  pix_t img [H][W];
  int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};
  int K  [5]  = '{1, 4, 6, 4, 1};

  // Reference results.
  int sm_exp [int];
  int ds_exp [$];
  kp_t kp_exp [$];
  int n_cand;

  task automatic make_image(input int f);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = pix_t'(90 + $urandom % 12);
    for (int b = 0; b < 6; b++) begin
      int x0, y0, w, h, v;
      x0 = 5 + $urandom % (W - 20); y0 = 5 + $urandom % (H - 20);
      w = 4 + $urandom % 10; h = 4 + $urandom % 10;
      v = (b % 2) ? 20 + $urandom % 30 : 180 + $urandom % 60;
      for (int y = y0; y < y0 + h; y++)
        for (int x = x0; x < x0 + w; x++) img[y][x] = pix_t'(v);
    end
  endtask

  function automatic int score(input int x, input int y);
    int s = 0, c, p;
    if (x < 3 || y < 3 || x > W - 4 || y > H - 4) return 0;
    c = img[y][x];
    for (int i = 0; i < 16; i++) begin
      p = img[y + DY[i]][x + DX[i]];
      s += (p > c) ? p - c : c - p;
    end
    return s;
  endfunction

  // FAST-9 result: -1 for no keypoint, otherwise the orientation.
  function automatic int fast(input int x, input int y);
    int c, p;
    bit s [2][16];
    if (x < 3 || y < 3 || x > W - 4 || y > H - 4) return -1;
    c = img[y][x];
    for (int i = 0; i < 16; i++) begin
      p = img[y + DY[i]][x + DX[i]];
      s[0][i] = p > c + TH;
      s[1][i] = p + TH < c;
    end
    for (int t = 0; t < 2; t++) begin
      int ones = 0;
      for (int i = 0; i < 16; i++) ones += s[t][i];
      if (ones == 16) return 0;
      for (int a = 0; a < 16; a++) begin
        int L = 0;
        if (!s[t][a] || s[t][(a + 15) % 16]) continue;
        while (s[t][(a + L) % 16]) L++;
        if (L >= 9) return (a + L - 1 - (L - 1) / 2) % 16;
      end
    end
    return -1;
  endfunction

  task automatic reference();
    int ow, oh;
    sm_exp.delete(); ds_exp.delete(); kp_exp.delete();
    n_cand = 0;
    for (int y = 3; y <= H - 4; y++)
      for (int x = 3; x <= W - 4; x++) begin
        int s = 0;
        for (int r = 0; r < 5; r++) for (int c = 0; c < 5; c++) s += K[r] * K[c] * img[y - 2 + r][x - 2 + c];
        sm_exp[1000 + y * W + x] = (s + 128) / 256;
      end
    ow = (W + 2) / 3 + W / 3;
    oh = (H + 1) / 3 + H / 3;
    for (int i = 0; i < oh; i++)
      for (int j = 0; j < ow; j++) begin
        int y0, x0, ny, nx, s;
        ny = (i % 2 == 0) ? 1 : 2;  nx = (j % 2 == 0) ? 1 : 2;
        y0 = (i % 2 == 0) ? 3 * (i / 2) : 3 * (i / 2) + 1;
        x0 = (j % 2 == 0) ? 3 * (j / 2) : 3 * (j / 2) + 1;
        s = 0;
        for (int a = 0; a < ny; a++) for (int b = 0; b < nx; b++) s += img[y0 + a][x0 + b];
        ds_exp.push_back((s + (ny * nx) / 2) / (ny * nx));
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int o, sc;
        bit keep;
        o = fast(x, y);
        if (o < 0) continue;
        n_cand++;
        sc = score(x, y);
        keep = 1;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if ((dx != 0 || dy != 0) && score(x + dx, y + dy) >= sc) keep = 0;
        if (keep && x >= M && x <= W - 1 - M && y >= M && y <= H - 1 - M)
          kp_exp.push_back('{x: COORD_W'(x), y: COORD_W'(y), orient: ORIENT_W'(o)});
      end
  endtask

  int sm_seen = 0, ds_seen, kp_seen, sm_stall = 0;
  always @(posedge clk) sm_ready <= ($urandom % 100) < 85;
  always @(posedge clk) begin
    if (rst_n && sm_seen > 0 && int'(sm_rows) > 3 && sm_seen < (int'(sm_rows) - 3) * (W - 6)) begin
      checks++;
      failures++;
      if (failures < 10) $display("sm_rows %0d ahead of %0d written pixels", sm_rows, sm_seen);
    end
    if (rst_n && sm_valid && !sm_ready) sm_stall++;
    if (rst_n && sm_valid && sm_ready) begin
      sm_seen++;
      checks++;
      if (!sm_exp.exists(int'(sm_addr)) || sm_exp[int'(sm_addr)] != int'(sm_pix)) begin
        failures++;
        if (failures < 10) $display("smoothed write %0d = %0d wrong", sm_addr, sm_pix);
      end
    end
    if (rst_n && ds_valid) begin
      checks++;
      if (ds_seen >= ds_exp.size() || ds_exp[ds_seen] != int'(ds_pix)) begin
        failures++;
        if (failures < 10) $display("down-sampled sample %0d wrong", ds_seen);
      end
      ds_seen++;
    end
  end

  // The keypoint buffer is drained slowly, at random.
  always @(posedge clk) kp_ready <= ($urandom % 4) == 0;
  always @(posedge clk) begin
    if (rst_n && kp_valid && kp_ready) begin
      checks++;
      if (kp_seen >= kp_exp.size() || kp_data != kp_exp[kp_seen]) begin
        failures++;
        if (failures < 10) $display("keypoint %0d (%0d,%0d,o%0d) unexpected", kp_seen, kp_data.x, kp_data.y, kp_data.orient);
      end
      kp_seen++;
    end
  end

  initial begin
    int c0, k0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      make_image(f);
      reference();
      sm_seen = 0; ds_seen = 0; kp_seen = 0;
      c0 = int'(cand_count); k0 = int'(kp_count);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid = 1;
          in_pix   = img[y][x];
          @(negedge clk);
          in_valid = 0;
          if ($urandom % 5 == 0) @(negedge clk);
        end
      repeat (400) @(negedge clk);
      checks += 5;
      if (sm_seen != (W - 6) * (H - 6)) begin failures++; $display("%0d smoothed pixels", sm_seen); end
      if (int'(sm_rows) != H - 3) begin failures++; $display("sm_rows %0d", sm_rows); end
      if (ds_seen != ds_exp.size()) begin failures++; $display("%0d down-sampled, expected %0d", ds_seen, ds_exp.size()); end
      if (kp_seen != kp_exp.size() || int'(kp_count) - k0 != kp_exp.size()) begin
        failures++; $display("%0d keypoints read, %0d counted, expected %0d", kp_seen, int'(kp_count) - k0, kp_exp.size());
      end
      if (int'(cand_count) - c0 != n_cand) begin failures++; $display("candidates %0d expected %0d", int'(cand_count) - c0, n_cand); end
      $display("frame %0d: %0d candidates, %0d keypoints", f, n_cand, kp_exp.size());
      checks++;
      if (kp_exp.size() == 0 || kp_exp.size() >= n_cand) begin failures++; $display("NMS had nothing to do"); end
    end
    checks++;
    if (kp_overflow) begin failures++; $display("keypoint buffer overflowed"); end
    checks++;
    if (sm_overflow || sm_stall == 0) begin
      failures++; $display("Gaussian image buffer: overflow %0d, stalls %0d", sm_overflow, sm_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
