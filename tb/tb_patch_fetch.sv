// tb_patch_fetch: self-checking testbench of the patch fetch controller.
//
// Feeds a list of keypoints (runs of keypoints in one row at distances below
// and above the patch width, other rows, another scale) to the controller,
// with the memory model behind its read port. After each fetch the captured
// patch-buffer writes are checked: every logical patch pixel (row r, column
// c) must sit at physical column (ptr + c) mod 45 and hold the smoothed-image
// byte of row y-22+r, column x-22+c. Also checks the number of pixels
// fetched (45 x d on reuse, 45 x 45 otherwise), the number of memory beats
// (45 x ceil(n / 4): every beat is written in the cycle it arrives), the
// reuse / full counters, and that no request is issued before the needed
// smoothed rows exist.
module tb_patch_fetch;
  import orb_pkg::*;
  localparam int W0 = 120, H0 = 96, NS = 3, R = 22, N = 2 * R + 1;
  localparam int MEMSZ = 20000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_ready;
  kps_t in_kp;
  logic [COORD_W-1:0] sm_rows [NS];
  logic req_valid, req_ready, rsp_valid;
  logic [ADDR_W-1:0] req_addr;
  logic [5:0] req_len;
  beat_t rsp_data;
  logic pb_we [MEM_BEAT];
  logic done;
  logic [5:0] pb_row, ptr;
  logic [5:0] pb_col [MEM_BEAT];
  beat_t pb_data;
  logic [31:0] fetched, reuse_count, full_count;

  patch_fetch #(.W0(W0), .H0(H0), .NS(NS), .R(R)) dut (.*);

  logic        nw_valid [NS];
  logic [31:0] nw_addr  [NS];
  logic [7:0]  nw_data  [NS];
  assign nw_valid = '{default: 1'b0};
  assign nw_addr  = '{default: 32'd0};
  assign nw_data  = '{default: 8'd0};

  ext_mem_model #(.SIZE(MEMSZ), .NW(NS)) u_mem (
    .clk, .wr_valid(nw_valid), .wr_addr(nw_addr), .wr_data(nw_data),
    .req_valid, .req_ready, .req_addr, .req_len, .rsp_valid, .rsp_data
  );

  int checks = 0, failures = 0, early_req = 0;
  pix_t pbuf [N][N];
  int beats = 0;
  always @(posedge clk) begin
    for (int j = 0; j < MEM_BEAT; j++)
      if (pb_we[j]) pbuf[pb_row][pb_col[j]] <= pb_data[j];
    if (rsp_valid) beats++;
  end

  // Width and base of scale s, computed here from the 2/3 rule.
  function automatic int sw(input int s);
    return (s == 0) ? W0 : (s == 1) ? 80 : 54;
  endfunction
  function automatic int sbase(input int s);
    return (s == 0) ? 0 : (s == 1) ? W0 * H0 : W0 * H0 + 80 * 64;
  endfunction

  int cur_need;
  always @(posedge clk)
    if (rst_n && req_valid && int'(sm_rows[in_kp.scale]) <= cur_need) early_req++;

  task automatic run_kp(input int s, input int x, input int y, input int exp_n, input bit hold);
    int f0, p, b0;
    f0 = int'(fetched);
    b0 = beats;
    in_kp = '{scale: SCALE_W'(s), x: COORD_W'(x), y: COORD_W'(y), orient: '0};
    cur_need = y + R;
    if (hold) sm_rows[s] = COORD_W'(y + R);     // needed row not yet written
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    if (hold) begin
      repeat (30) @(negedge clk);
      sm_rows[s] = COORD_W'(y + R + 1);
    end
    while (!done) @(negedge clk);
    sm_rows[s] = COORD_W'(2000);
    @(negedge clk);
    p = int'(ptr);
    checks++;
    if (int'(fetched) - f0 != N * exp_n) begin
      failures++;
      $display("kp (%0d,%0d): fetched %0d, expected %0d", x, y, int'(fetched) - f0, N * exp_n);
    end
    checks++;
    if (beats - b0 != N * ((exp_n + MEM_BEAT - 1) / MEM_BEAT)) begin
      failures++;
      $display("kp (%0d,%0d): %0d beats, expected %0d", x, y, beats - b0,
               N * ((exp_n + MEM_BEAT - 1) / MEM_BEAT));
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        int a;
        a = sbase(s) + (y - R + r) * sw(s) + (x - R + c);
        checks++;
        if (pbuf[r][(p + c) % N] != u_mem.mem[a]) begin
          failures++;
          if (failures < 10) $display("kp (%0d,%0d) r=%0d c=%0d wrong", x, y, r, c);
        end
      end
  endtask

  initial begin
    sm_rows = '{default: COORD_W'(2000)};
    in_kp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_kp(0, 30, 40, N, 1);     // full fetch, waits for rows
    run_kp(0, 35, 40, 5, 0);     // reuse d = 5
    run_kp(0, 70, 40, 35, 0);    // reuse d = 35, pointer wraps
    run_kp(0, 94, 40, 24, 0);    // reuse d = 24
    run_kp(0, 94, 41, N, 0);     // next row: full
    run_kp(0, 40, 50, N, 0);     // full
    run_kp(0, 90, 50, N, 0);     // d = 50 > 44: full
    run_kp(1, 30, 30, N, 1);     // other scale: full
    run_kp(1, 44, 30, 14, 0);    // reuse
    run_kp(1, 54, 30, 10, 0);    // reuse
    checks++;
    if (reuse_count != 5 || full_count != 5) begin
      failures++; $display("reuse %0d full %0d", reuse_count, full_count);
    end
    checks++;
    if (early_req != 0) begin failures++; $display("request before rows were ready"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
