// tb_rbrief: self-checking testbench of the rotated BRIEF unit.
//
// A random 45 x 45 patch is held in a testbench array that answers the four
// read ports one cycle after each read. For every orientation and several
// column pointers, the expected descriptor is computed here: sin and cos
// are rounded from $cos/$sin (Q7), both points of every pattern pair are
// rotated and rounded as xr = floor((x*cos - y*sin + 64) / 128), the pixels
// are looked up at row 22+yr and physical column (ptr + 22 + xr) mod 45,
// and bit i is p1 < p2. Also checks the 130-cycle start-to-done time.
module tb_rbrief;
  import orb_pkg::*;
  localparam int R = 22, N = 2 * R + 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, pb_re, done;
  logic [ORIENT_W-1:0] orient;
  logic [5:0] ptr;
  logic [5:0] pb_rrow [4], pb_rcol [4];
  pix_t pb_rdata [4];
  logic [NPAIRS-1:0] desc;

  rbrief #(.R(R)) dut (.*);

  pix_t patch [N][N];
  always @(posedge clk)
    if (pb_re)
      for (int k = 0; k < 4; k++) pb_rdata[k] <= patch[pb_rrow[k]][pb_rcol[k]];

  int checks = 0, failures = 0;

  function automatic int fdiv128(input int v);
    return (v >= 0) ? v / 128 : -((-v + 127) / 128);
  endfunction

  function automatic pix_t sample(input int x, input int y, input int o, input int p);
    int c, s, xr, yr;
    real th;
    th = o * 3.14159265358979 / 8.0;
    c = int'($floor(128.0 * $cos(th) + 0.5));
    s = int'($floor(128.0 * $sin(th) + 0.5));
    xr = fdiv128(x * c - y * s + 64);
    yr = fdiv128(x * s + y * c + 64);
    return patch[R + yr][(p + R + xr + 2 * N) % N];
  endfunction

  initial begin
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) patch[r][c] = pix_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 48; t++) begin
      logic [NPAIRS-1:0] e;
      int cyc;
      orient = ORIENT_W'(t % 16);
      ptr    = 6'((t * 17) % N);
      for (int i = 0; i < int'(NPAIRS); i++)
        e[i] = sample(pat_coord(i, 0), pat_coord(i, 1), t % 16, int'(ptr)) <
               sample(pat_coord(i, 2), pat_coord(i, 3), t % 16, int'(ptr));
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 130) begin failures++; $display("done after %0d cycles", cyc); end
      checks++;
      if (desc != e) begin
        failures++;
        if (failures < 10) $display("orient %0d ptr %0d: %0d bits differ", orient, ptr, $countones(desc ^ e));
      end
      if (t == 20) for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) patch[r][c] = pix_t'($urandom);
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
