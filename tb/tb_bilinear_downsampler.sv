// tb_bilinear_downsampler: self-checking testbench of the 2/3 down sampler.
//
// Streams random images whose sizes are not multiples of 3 in raster order
// (the 2x2 corner of each position taken from the image, as the register
// file would present it) and compares the output stream with the expected
// ds_cols(W) x ds_rows(H) image: output sample 2k maps to input index 3k,
// output sample 2k+1 to the mean of input indices 3k+1 and 3k+2, rounded to
// nearest, independently in x and y.
module tb_bilinear_downsampler;
  import orb_pkg::*;
  localparam int W = 17, H = 14;
  localparam int OW = 11, OH = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  pix_t q [2][2];
  logic [COORD_W-1:0] in_x, in_y;
  logic out_valid;
  pix_t out_pix;

  bilinear_downsampler dut (.*);

  int checks = 0, failures = 0, nout = 0;
  pix_t img [H][W];
  int exp_q [$];

  function automatic int px(input int x, input int y);
    if (x < 0 || y < 0) return 0;
    return img[y][x];
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int e;
      nout++;
      checks++;
      if (exp_q.size() == 0) begin failures++; end
      else begin
        e = exp_q.pop_front();
        if (int'(out_pix) != e) begin
          failures++;
          if (failures < 10) $display("output %0d: got %0d exp %0d", nout, out_pix, e);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
      for (int i = 0; i < OH; i++)
        for (int j = 0; j < OW; j++) begin
          int ys [2], xs [2], ny, nx, s;
          ny = (i % 2 == 0) ? 1 : 2;
          nx = (j % 2 == 0) ? 1 : 2;
          ys[0] = (i % 2 == 0) ? 3 * (i / 2) : 3 * (i / 2) + 1;  ys[1] = ys[0] + 1;
          xs[0] = (j % 2 == 0) ? 3 * (j / 2) : 3 * (j / 2) + 1;  xs[1] = xs[0] + 1;
          s = 0;
          for (int a = 0; a < ny; a++) for (int b = 0; b < nx; b++) s += img[ys[a]][xs[b]];
          exp_q.push_back((s + (ny * nx) / 2) / (ny * nx));
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid = 1;
          in_x = COORD_W'(x);
          in_y = COORD_W'(y);
          q[0][0] = pix_t'(px(x, y));     q[0][1] = pix_t'(px(x - 1, y));
          q[1][0] = pix_t'(px(x, y - 1)); q[1][1] = pix_t'(px(x - 1, y - 1));
          @(negedge clk);
          in_valid = 0;
          if ($urandom % 4 == 0) @(negedge clk);
        end
      @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); exp_q.delete(); end
    end
    checks++;
    if (nout != 3 * OW * OH) begin failures++; $display("%0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
