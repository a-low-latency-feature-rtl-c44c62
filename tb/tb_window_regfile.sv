// tb_window_regfile: self-checking testbench of the 7x7 register file.
//
// Shifts in random columns (with random gaps) and checks after each shift
// that win[r][c] equals element r of the column shifted in c shifts ago, and
// that win_x / win_y follow the newest column.
module tb_window_regfile;
  import orb_pkg::*;
  localparam int N = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic col_valid = 0;
  pix_t col [N];
  logic [COORD_W-1:0] col_x = 0, col_y = 0;
  logic win_valid;
  pix_t win [N][N];
  logic [COORD_W-1:0] win_x, win_y;

  window_regfile #(.N(N)) dut (.*);

  int checks = 0, failures = 0, nshift = 0;
  pix_t hist [$][N];

  // Called half a cycle after a shift.
  task automatic check_window();
    if (nshift < N) return;
    checks++;
    if (!win_valid) failures++;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        checks++;
        if (win[r][c] != hist[hist.size() - 1 - c][r]) failures++;
      end
    checks++;
    if (win_x != COORD_W'(nshift) || win_y != COORD_W'(nshift / 3)) failures++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 1; n <= 300; n++) begin
      pix_t v [N];
      for (int r = 0; r < N; r++) v[r] = pix_t'($urandom);
      col       = v;
      col_valid = 1;
      col_x     = COORD_W'(n);
      col_y     = COORD_W'(n / 3);
      hist.push_back(v);
      @(negedge clk);
      nshift    = n;
      col_valid = 0;
      check_window();
      if ($urandom % 2) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (checks < 1000) failures++;
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
