// tb_patch_buffer: self-checking testbench of the banked patch buffer.
//
// Fills the 45 x 45 patch with random bytes a beat (four consecutive
// columns) at a time, including beats that wrap from column 44 to column 0.
// It then keeps writing beats at random rows and start columns, with random
// lane enables, while reading four random locations per cycle. Each read
// port's result (one cycle after the read, checked while the next read's
// addresses are already applied) is compared with a model array.
// Some reads hit a location written in the same cycle, which must return
// the old value.
module tb_patch_buffer;
  import orb_pkg::*;
  localparam int R = 22, N = 2 * R + 1;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we [MEM_BEAT];
  logic re = 0;
  logic [5:0] wrow;
  logic [5:0] wcol [MEM_BEAT];
  beat_t wdata;
  logic [5:0] rrow [4], rcol [4];
  pix_t rdata [4];

  patch_buffer #(.R(R), .NRD(4)) dut (.*);

  int checks = 0, failures = 0;
  pix_t model [N][N];
  pix_t e_prev [4];

  // Beat at row r starting at physical column c0, lanes enabled by mask.
  task automatic set_beat(input int r, input int c0, input logic [MEM_BEAT-1:0] mask);
    wrow = 6'(r);
    for (int j = 0; j < MEM_BEAT; j++) begin
      we[j]    = mask[j];
      wcol[j]  = 6'((c0 + j) % N);
      wdata[j] = pix_t'($urandom);
    end
  endtask

  task automatic commit_beat();
    for (int j = 0; j < MEM_BEAT; j++)
      if (we[j]) model[wrow][wcol[j]] = wdata[j];
  endtask

  initial begin
    we = '{default: 1'b0};
    wcol = '{default: 6'd0};
    wrow = '0;
    wdata = '0;
    @(negedge clk);
    // Fill: each row written as beats from a random start column, wrapping.
    for (int r = 0; r < N; r++) begin
      int c0 = $urandom % N;
      for (int k = 0; k < N; k += MEM_BEAT) begin
        set_beat(r, c0 + k, (N - k >= MEM_BEAT) ? '1 : MEM_BEAT'((1 << (N - k)) - 1));
        @(negedge clk);
        commit_beat();
      end
    end
    // The data of a read is checked after the next read's addresses are
    // applied, as a consumer reading every cycle sees it.
    for (int n = 0; n <= 3000; n++) begin
      re = (n < 3000);
      for (int k = 0; k < 4; k++) begin
        rrow[k] = 6'($urandom % N);
        rcol[k] = 6'($urandom % N);
      end
      #1;
      if (n > 0)
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (rdata[k] != e_prev[k]) begin
            failures++;
            if (failures < 10) $display("port %0d got %0d exp %0d", k, rdata[k], e_prev[k]);
          end
        end
      for (int k = 0; k < 4; k++) e_prev[k] = model[rrow[k]][rcol[k]];
      if (n % 5 == 0) set_beat(rrow[0], rcol[0], MEM_BEAT'($urandom));
      else            set_beat($urandom % N, $urandom % N, MEM_BEAT'($urandom));
      @(negedge clk);
      commit_beat();
    end
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
