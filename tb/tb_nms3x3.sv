// tb_nms3x3: self-checking testbench of the two-stage 3x3 NMS.
//
// Streams random score maps (a W x H image of cand_t, sparse candidates,
// scores drawn from a small range so that ties occur) through the block in
// raster order, with random idle cycles between pixels, and compares the set
// of reported keypoints with a brute-force 8-neighbour strict-maximum search
// over the same map.
module tb_nms3x3;
  import orb_pkg::*;
  localparam int W = 24, H = 16, FRAMES = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  cand_t in_cand;
  logic [COORD_W-1:0] in_x, in_y;
  logic out_valid;
  logic [COORD_W-1:0] out_x, out_y;
  logic [ORIENT_W-1:0] out_orient;
  logic [SCORE_W-1:0] out_score;

  nms3x3 #(.W(W)) dut (.*);

  int checks = 0, failures = 0;
  cand_t img [H][W];
  bit    got [H][W];
  int    extra = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (out_x >= W || out_y >= H) extra++;
      else begin
        if (got[out_y][out_x]) extra++;
        got[out_y][out_x] = 1;
        checks++;
        if (out_orient != img[out_y][out_x].orient || out_score != img[out_y][out_x].score) begin
          failures++;
          $display("wrong data at %0d,%0d", out_x, out_y);
        end
      end
    end
  end

  function automatic int sc(input int x, input int y);
    if (x < 0 || y < 0 || x >= W || y >= H) return 0;
    return img[y][x].score;
  endfunction

  int total_kp = 0, total_cand = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          img[y][x].is_cand = ($urandom % 3) == 0;
          img[y][x].score   = SCORE_W'((f < 3) ? $urandom % 8 : $urandom % 4000);
          img[y][x].orient  = ORIENT_W'($urandom);
          got[y][x] = 0;
          if (img[y][x].is_cand) total_cand++;
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid = 1;
          in_cand  = img[y][x];
          in_x     = COORD_W'(x);
          in_y     = COORD_W'(y);
          @(negedge clk);
          in_valid = 0;
          if ($urandom % 4 == 0) @(negedge clk);
        end
      // A trailing row of zeros so the last image row gets its lower neighbours,
      for (int x = 0; x < W; x++) begin
        in_valid = 1;
        in_cand  = '0;
        in_x     = COORD_W'(x);
        in_y     = COORD_W'(H);
        @(negedge clk);
      end
      // and one more pixel so the last pixel of that row is evaluated.
      in_valid = 1;
      in_x     = '0;
      in_y     = COORD_W'(H + 1);
      @(negedge clk);
      in_valid = 0;
      repeat (5) @(negedge clk);
      // Compare with the brute-force result.
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          bit e;
          e = img[y][x].is_cand;
          for (int dy = -1; dy <= 1; dy++)
            for (int dx = -1; dx <= 1; dx++)
              if ((dx != 0 || dy != 0) && sc(x + dx, y + dy) >= img[y][x].score) e = 0;
          if (e) total_kp++;
          checks++;
          if (e != got[y][x]) begin
            failures++;
            if (failures < 10) $display("frame %0d (%0d,%0d): expected %0d got %0d", f, x, y, e, got[y][x]);
          end
        end
    end
    checks++;
    if (extra != 0) begin failures++; $display("%0d unexpected outputs", extra); end
    checks++;
    if (total_kp == 0) begin failures++; $display("no keypoint was produced"); end
    $display("candidates %0d keypoints %0d", total_cand, total_kp);
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
