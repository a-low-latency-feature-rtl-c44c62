// tb_gaussian_buffer: self-checking testbench of the Gaussian image buffer.
//
// Streams the smoothed pixels of two W x H frames (interior 3..W-4 x 3..H-4,
// random values) into the buffer with random idle cycles, while the memory
// side accepts writes at random and sometimes refuses them for a long
// stretch. Checks, against a queue of the pixels sent:
//  * every write carries the next pixel and the address BASE + y * W + x of
//    its position in raster order;
//  * rows_done never counts a row before all its pixels were written, is
//    H-3 after a frame, and falls back to 0 with the first write of the next
//    frame;
//  * no overflow while the memory keeps up on average, and the sticky
//    overflow flag once more than DEPTH pixels arrive while writes are
//    refused.
module tb_gaussian_buffer;
  import orb_pkg::*;
  localparam int W = 20, H = 12, DEPTH = 16, BASE = 500;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, wr_valid, wr_ready = 0, overflow;
  pix_t in_pix, wr_data;
  logic [ADDR_W-1:0] wr_addr;
  logic [COORD_W-1:0] rows_done;

  gaussian_buffer #(.W(W), .H(H), .DEPTH(DEPTH), .BASE(BASE)) dut (.*);

  int checks = 0, failures = 0;
  int exp_pix [$], exp_addr [$];
  int written = 0;       // pixels written in the current frame
  bit ready_mode = 1;    // 1: random ready, 0: never ready
  int stall = 0;

  always @(posedge clk) begin
    if (!ready_mode)    wr_ready <= 1'b0;
    else if (stall > 0) begin wr_ready <= 1'b0; stall <= stall - 1; end
    else begin
      wr_ready <= ($urandom % 100) < 90;
      if ($urandom % 200 == 0) stall <= 8;
    end
  end

  always @(posedge clk) begin
    if (rst_n && written > 0 && int'(rows_done) > 3 && written < (int'(rows_done) - 3) * (W - 6)) begin
      checks++;
      failures++;
      if (failures < 10) $display("rows_done %0d with %0d pixels written", rows_done, written);
    end
    if (rst_n && wr_valid && wr_ready) begin
      checks++;
      if (exp_pix.size() == 0) begin
        failures++;
        $display("write with nothing pending");
      end else begin
        int p, a;
        p = exp_pix.pop_front();
        a = exp_addr.pop_front();
        if (int'(wr_data) != p || int'(wr_addr) != a) begin
          failures++;
          if (failures < 10) $display("write %0d @%0d, expected %0d @%0d", wr_data, wr_addr, p, a);
        end
      end
      written++;
    end
  end

  task automatic send_frame();
    for (int y = 3; y <= H - 4; y++)
      for (int x = 3; x <= W - 4; x++) begin
        in_valid = 1;
        in_pix = pix_t'($urandom);
        exp_pix.push_back(int'(in_pix));
        exp_addr.push_back(BASE + y * W + x);
        @(negedge clk);
        in_valid = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      written = 0;
      send_frame();
      while (exp_pix.size() != 0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (int'(rows_done) != H - 3 || written != (W - 6) * (H - 6)) begin
        failures++;
        $display("frame %0d: rows_done %0d, %0d written", f, rows_done, written);
      end
      // The first write of the next frame restarts the row count.
      if (f == 0) begin
        written = 0;
        in_valid = 1;
        in_pix = pix_t'($urandom);
        exp_pix.push_back(int'(in_pix));
        exp_addr.push_back(BASE + 3 * W + 3);
        @(negedge clk);
        in_valid = 0;
        while (exp_pix.size() != 0) @(negedge clk);
        @(negedge clk);
        checks++;
        if (rows_done != '0) begin failures++; $display("rows_done not restarted"); end
        // Rest of the second frame: skip the pixel already sent.
        for (int y = 3; y <= H - 4; y++)
          for (int x = 3; x <= W - 4; x++) begin
            if (y == 3 && x == 3) continue;
            in_valid = 1;
            in_pix = pix_t'($urandom);
            exp_pix.push_back(int'(in_pix));
            exp_addr.push_back(BASE + y * W + x);
            @(negedge clk);
            in_valid = 0;
            if ($urandom % 3 == 0) @(negedge clk);
          end
        while (exp_pix.size() != 0) @(negedge clk);
        repeat (3) @(negedge clk);
        checks++;
        if (int'(rows_done) != H - 3 || written != (W - 6) * (H - 6)) begin
          failures++;
          $display("frame 1: rows_done %0d, %0d written", rows_done, written);
        end
        break;
      end
    end
    checks++;
    if (overflow) begin failures++; $display("overflow while memory kept up"); end
    // Memory refuses writes: DEPTH pixels fit, the next one is lost.
    ready_mode = 0;
    repeat (2) @(negedge clk);
    for (int i = 0; i <= DEPTH; i++) begin
      in_valid = 1;
      in_pix = pix_t'(i);
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (!overflow) begin failures++; $display("no overflow after DEPTH+1 pixels"); end
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
