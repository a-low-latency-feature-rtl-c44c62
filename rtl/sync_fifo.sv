// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used as the keypoint buffer of each scale, as the Gaussian image buffer
// and as the descriptor buffer.
// The head entry is visible on rd_data whenever rd_valid is high; it is
// removed when rd_ready is also high. Writes are accepted when wr_ready
// (not full); a write to a full FIFO is dropped and raises the sticky
// overflow flag, so an upstream stage that cannot stall (the pixel-rate
// detector) shows lost keypoints instead of silently stalling the sensor.
// Storage is an array of DEPTH entries (any depth, not only powers of two)
// with wrapping read and write pointers and an occupancy counter. Depth and
// width are set by the instantiating block.
module sync_fifo #(
  parameter int unsigned WIDTH = 26,
  parameter int unsigned DEPTH = 512
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH):0] count,
  output logic             overflow
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr     <= '0;
      rptr     <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      if (do_wr && !do_rd)      count <= count + 1'b1;
      else if (!do_wr && do_rd) count <= count - 1'b1;
      if (wr_valid && !wr_ready) overflow <= 1'b1;
    end
  end

  // The occupancy never exceeds the depth.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                  count <= ($clog2(DEPTH)+1)'(DEPTH));

endmodule
