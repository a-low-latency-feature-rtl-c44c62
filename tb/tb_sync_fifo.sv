// tb_sync_fifo: self-checking testbench of the first-word-fall-through FIFO.
//
// Random writes and reads against a queue model: checks the head data, the
// valid/ready flags, the occupancy count, that a write to a full FIFO is
// dropped and sets the overflow flag, and that reading is immediate (data
// written in one cycle is at the head in the next).
module tb_sync_fifo;
  localparam int WIDTH = 26, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0, overflow;
  logic [WIDTH-1:0] wr_data = 0, rd_data;
  logic [$clog2(DEPTH):0] count;

  sync_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, full_seen = 0;
  logic [WIDTH-1:0] model [$];
  bit exp_ovf = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      // Phase-dependent bias: fill up, then drain.
      wr_valid = ($urandom % 100) < ((n / 500) % 2 ? 30 : 80);
      rd_ready = ($urandom % 100) < ((n / 500) % 2 ? 80 : 30);
      wr_data  = WIDTH'($urandom);
      #1;
      checks++;
      if (rd_valid != (model.size() != 0) || wr_ready != (model.size() != DEPTH) ||
          int'(count) != model.size() || overflow != exp_ovf) begin
        failures++;
        if (failures < 10) $display("flags: size %0d count %0d", model.size(), count);
      end
      if (model.size() != 0) begin
        checks++;
        if (rd_data != model[0]) failures++;
      end
      if (model.size() == DEPTH) full_seen++;
      begin
        bit accept, pop;
        accept = wr_valid && model.size() != DEPTH;
        pop    = rd_ready && model.size() != 0;
        if (wr_valid && !accept) exp_ovf = 1;
        @(posedge clk);
        if (pop) void'(model.pop_front());
        if (accept) model.push_back(wr_data);
      end
      @(negedge clk);
    end
    checks++;
    if (full_seen == 0 || !exp_ovf) begin failures++; $display("full state or overflow never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
