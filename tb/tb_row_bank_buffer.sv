// tb_row_bank_buffer: self-checking testbench of the row bank buffer.
//
// Streams two frames of random pixels (small W x H, random idle cycles) and
// checks every output column against the image: col[k] must be the pixel of
// row y-k at column x, for all k whose row exists in the current frame.
module tb_row_bank_buffer;
  import orb_pkg::*;
  localparam int W = 13, H = 11, NB = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  pix_t in_pix;
  logic col_valid;
  pix_t col [NB+1];
  logic [COORD_W-1:0] col_x, col_y;

  row_bank_buffer #(.W(W), .H(H), .NBANKS(NB)) dut (.*);

  int checks = 0, failures = 0, ncols = 0;
  pix_t img [H][W];

  always @(posedge clk) begin
    if (rst_n && col_valid) begin
      ncols++;
      for (int k = 0; k <= NB; k++) begin
        if (int'(col_y) - k >= 0) begin
          checks++;
          if (col[k] != img[int'(col_y) - k][col_x]) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d) k=%0d got %0d exp %0d", col_x, col_y, k, col[k], img[int'(col_y) - k][col_x]);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = pix_t'($urandom);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid = 1;
          in_pix   = img[y][x];
          @(negedge clk);
          in_valid = 0;
          if ($urandom % 3 == 0) @(negedge clk);
        end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (ncols != 2 * W * H) begin failures++; $display("%0d columns, expected %0d", ncols, 2 * W * H); end
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
