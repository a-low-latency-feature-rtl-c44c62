// tb_ofast: self-checking testbench of the oFAST pipeline.
//
// Drives (1) every one of the 65536 dark-test strings and a slice of the
// bright-test strings, built as windows with a centre of 100 and ring pixels
// of 200 / 100 / 10, and (2) random windows. Expected keypoint flag,
// orientation (middle of the run of ones) and SAD score are computed here by
// brute force over the ring. Every output is also checked to appear exactly four cycles after its input.
module tb_ofast;
  import orb_pkg::*;
  localparam int TH = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, inner = 1;
  pix_t w [7][7];
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic out_valid;
  cand_t out_cand;
  logic [COORD_W-1:0] out_x, out_y;

  ofast #(.TH(TH)) dut (.*);

  int checks = 0, failures = 0;
  cand_t exp_q [$];
  int    expx_q [$];

  // Ring offsets, index 0 above the centre, clockwise.
  int DX [16] = '{0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3, -3, -3, -2, -1};
  int DY [16] = '{-3, -3, -2, -1, 0, 1, 2, 3, 3, 3, 2, 1, 0, -1, -2, -3};

  function automatic cand_t golden(input pix_t win [7][7], input bit inn);
    cand_t r;
    int c, p, sad;
    bit dk [16], br [16];
    bit found;
    int mid;
    c = win[3][3];
    sad = 0;
    for (int i = 0; i < 16; i++) begin
      p = win[3 - DY[i]][3 - DX[i]];
      dk[i] = p > c + TH;
      br[i] = p + TH < c;
      sad += (p > c) ? p - c : c - p;
    end
    found = 0; mid = 0;
    for (int t = 0; t < 2; t++) begin
      bit s [16];
      int ones = 0;
      for (int i = 0; i < 16; i++) s[i] = (t == 0) ? dk[i] : br[i];
      for (int i = 0; i < 16; i++) ones += s[i];
      if (found) continue;
      if (ones == 16) begin found = 1; mid = 0; continue; end
      for (int a = 0; a < 16; a++) begin
        int L = 0;
        if (!s[a] || s[(a + 15) % 16]) continue;
        while (s[(a + L) % 16]) L++;
        if (L >= 9) begin
          found = 1;
          mid = (a + L - 1 - (L - 1) / 2) % 16;
        end
      end
    end
    r.is_cand = inn && found;
    r.score   = inn ? SCORE_W'(sad) : '0;
    r.orient  = ORIENT_W'(mid);
    return r;
  endfunction

  int cyc = 0;
  int stamp_q [$];
  always @(posedge clk) cyc <= cyc + 1;

  // Present the current window for one cycle (called just after a negedge).
  task automatic drive(input bit inn);
    in_valid = 1;
    inner    = inn;
    in_x     = in_x + 1'b1;
    exp_q.push_back(golden(w, inn));
    expx_q.push_back(int'(in_x));
    stamp_q.push_back(cyc);
    @(negedge clk);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      cand_t e;
      int ex;
      e  = exp_q.pop_front();
      ex = expx_q.pop_front();
      checks++;
      if (cyc - stamp_q.pop_front() != 4) begin
        failures++;
        $display("latency is not four cycles");
      end
      checks++;
      if (out_cand.is_cand !== e.is_cand || out_cand.score !== e.score ||
          (e.is_cand && out_cand.orient !== e.orient) || int'(out_x) != ex) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH x=%0d got c=%0d o=%0d s=%0d exp c=%0d o=%0d s=%0d",
                   ex, out_cand.is_cand, out_cand.orient, out_cand.score,
                   e.is_cand, e.orient, e.score);
      end
    end
  end

  initial begin
    for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) w[r][c] = 8'd100;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // All dark strings.
    for (int pat = 0; pat < 65536; pat++) begin
      for (int i = 0; i < 16; i++) w[3 - DY[i]][3 - DX[i]] = pat[i] ? 8'd200 : 8'd110;
      drive(1);
    end
    // Bright strings, every 7th pattern.
    for (int pat = 0; pat < 65536; pat += 7) begin
      for (int i = 0; i < 16; i++) w[3 - DY[i]][3 - DX[i]] = pat[i] ? 8'd10 : 8'd90;
      drive(pat % 3 != 0);
    end
    // Random windows with a random centre.
    for (int n = 0; n < 20000; n++) begin
      for (int r = 0; r < 7; r++) for (int c = 0; c < 7; c++) w[r][c] = pix_t'($urandom);
      drive(1);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
