// tb_binomial_smoother: self-checking testbench of the 5x5 binomial filter.
//
// Applies random and extreme (all 0, all 255, single bright pixel) windows
// and compares the output with a direct 5x5 convolution by the kernel
// [1 4 6 4 1]^T [1 4 6 4 1], rounded and divided by 256, computed here with
// ordinary multiplications. Also checks the one-cycle latency.
module tb_binomial_smoother;
  import orb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0;
  pix_t w [5][5];
  logic [COORD_W-1:0] in_x = 0, in_y = 0;
  logic out_valid;
  pix_t out_pix;
  logic [COORD_W-1:0] out_x, out_y;

  binomial_smoother dut (.*);

  int checks = 0, failures = 0;
  int K [5] = '{1, 4, 6, 4, 1};

  function automatic int golden(input pix_t a [5][5]);
    int s = 0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) s += K[r] * K[c] * int'(a[r][c]);
    return (s + 128) / 256;
  endfunction

  task automatic apply(input int mode);
    int e;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        case (mode)
          0: w[r][c] = pix_t'($urandom);
          1: w[r][c] = 8'd0;
          2: w[r][c] = 8'd255;
          default: w[r][c] = (r == 2 && c == 2) ? 8'd255 : 8'd0;
        endcase
    e = golden(w);
    in_valid = 1;
    in_x = in_x + 1'b1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || int'(out_pix) != e || out_x != in_x) begin
      failures++;
      if (failures < 10) $display("got %0d exp %0d (valid %0d)", out_pix, e, out_valid);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    apply(1); apply(2); apply(3);
    for (int n = 0; n < 5000; n++) apply(0);
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
