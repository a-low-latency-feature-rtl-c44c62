// tb_descriptor_engine: self-checking testbench of the descriptor stage.
//
// Three testbench queues play the keypoint buffers of three scales; the
// memory model holds its fixed pattern as the smoothed images. The smoothed
// row counters start at zero and rise slowly, so the engine must wait for
// rows. Every descriptor read out is checked against a reference computed
// from the memory contents (orb_ref_pkg::ref_desc on the patch around the
// keypoint), every keypoint must come out exactly once, and the pixels
// fetched must equal 45 x 45 per full fetch plus 45 x d per reuse. The
// descriptor output is drained at random so the descriptor buffer also
// fills up. A last phase checks the arbitration: a scale-0 keypoint that
// arrives while a run of scale-1 keypoints of one row is being served must
// wait until the run is done, so that the run keeps its patch reuse.
module tb_descriptor_engine;
  import orb_pkg::*;
  import orb_ref_pkg::*;
  localparam int W0 = 180, H0 = 150, NS = 3, R = 22;
  localparam int MEMSZ = 45000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic kp_valid [NS], kp_ready [NS];
  kp_t  kp_data [NS];
  logic [COORD_W-1:0] sm_rows [NS];
  logic req_valid, req_ready, rsp_valid, desc_valid, desc_ready;
  logic [ADDR_W-1:0] req_addr;
  logic [5:0] req_len;
  beat_t rsp_data;
  desc_t desc_data;
  logic [31:0] fetched, reuse_count, full_count, desc_count;

  descriptor_engine #(.W0(W0), .H0(H0), .NS(NS), .R(R), .DESC_DEPTH(4)) dut (.*);

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

  int checks = 0, failures = 0;
  kp_t q [NS][$];
  int outstanding [string];
  int total = 0;

  int SW [NS] = '{180, 120, 80};
  int SB [NS] = '{0, 180 * 150, 180 * 150 + 120 * 100};

  always_comb
    for (int s = 0; s < NS; s++) begin
      kp_valid[s] = q[s].size() != 0;
      kp_data[s]  = kp_valid[s] ? q[s][0] : '0;
    end

  int taken [$];    // scales in the order their keypoints were taken
  always @(posedge clk)
    for (int s = 0; s < NS; s++)
      if (rst_n && kp_valid[s] && kp_ready[s]) begin
        void'(q[s].pop_front());
        taken.push_back(s);
      end

  always @(posedge clk) desc_ready <= ($urandom % 8) == 0;

  function automatic string key(input kps_t k);
    return $sformatf("%0d_%0d_%0d_%0d", k.scale, k.x, k.y, k.orient);
  endfunction

  int ndesc = 0;
  always @(posedge clk) begin
    if (rst_n && desc_valid && desc_ready) begin
      byte unsigned patch [45][45];
      kps_t k;
      k = desc_data.kp;
      for (int r = 0; r < 45; r++)
        for (int c = 0; c < 45; c++)
          patch[r][c] = u_mem.mem[SB[k.scale] + (int'(k.y) - R + r) * SW[k.scale] + int'(k.x) - R + c];
      checks++;
      if (desc_data.bits != ref_desc(patch, int'(k.orient))) begin
        failures++;
        $display("descriptor of %s wrong", key(k));
      end
      checks++;
      if (!outstanding.exists(key(k))) begin failures++; $display("unexpected keypoint %s", key(k)); end
      else outstanding.delete(key(k));
      ndesc++;
    end
  end

  task automatic add(input int s, input int x, input int y);
    kp_t k;
    kps_t ks;
    k = '{x: COORD_W'(x), y: COORD_W'(y), orient: ORIENT_W'($urandom)};
    ks = '{scale: SCALE_W'(s), x: k.x, y: k.y, orient: k.orient};
    q[s].push_back(k);
    outstanding[key(ks)] = 1;
    total++;
  endtask

  initial begin
    int exp_fetch;
    sm_rows = '{default: '0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Scale 0: two rows with close keypoints.
    add(0, 30, 40); add(0, 36, 40); add(0, 50, 40); add(0, 95, 40); add(0, 120, 40);
    add(0, 40, 60); add(0, 62, 60);
    // Scale 1 and 2.
    add(1, 30, 30); add(1, 50, 30); add(1, 60, 50);
    add(2, 30, 28); add(2, 40, 28);
    // Smoothed rows appear over time.
    for (int n = 0; n < 150; n++) begin
      for (int s = 0; s < NS; s++) sm_rows[s] = COORD_W'(n);
      repeat (40) @(negedge clk);
    end
    add(0, 60, 100); add(0, 70, 100); add(2, 45, 28);
    while (ndesc < total) @(negedge clk);
    // Arbitration: scale 0 arrives after the first of three scale-1 keypoints
    // of one row was taken; the two others must be served first.
    taken.delete();
    add(1, 30, 60); add(1, 40, 60); add(1, 50, 60);
    while (taken.size() == 0) @(negedge clk);
    add(0, 100, 120);
    while (ndesc < total) @(negedge clk);
    checks++;
    if (taken.size() != 4 || taken[1] != 1 || taken[2] != 1 || taken[3] != 0) begin
      failures++;
      $display("arbitration order wrong: %p", taken);
    end
    repeat (5) @(negedge clk);
    checks++;
    if (outstanding.size() != 0) begin failures++; $display("%0d keypoints without descriptor", outstanding.size()); end
    checks++;
    if (desc_count != 32'(total)) begin failures++; $display("desc_count %0d", desc_count); end
    // Fetch volume: 45*45 per full fetch, 45*d per reuse (d summed over reuses).
    exp_fetch = 45 * 45 * int'(full_count) + 45 * ((36 - 30) + (50 - 36) + (120 - 95) + (62 - 40) + (50 - 30) + (40 - 30) + (70 - 60) + (45 - 40) + (40 - 30) + (50 - 40));
    checks++;
    if (int'(reuse_count) != 10 || int'(full_count) != total - 10 || int'(fetched) != exp_fetch) begin
      failures++;
      $display("reuse %0d full %0d fetched %0d (expected %0d)", reuse_count, full_count, fetched, exp_fetch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (150000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
