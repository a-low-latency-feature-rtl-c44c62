// patch_buffer: local patch buffer of the descriptor stage.
//
// Holds one (2R+1) x (2R+1) patch of the smoothed image around the current
// keypoint. It is built from small single-port SRAM banks arranged two ways:
//
//   * Column interleaving, for the write side: physical column c lives in
//     column bank c mod NCB, at word row * (N/NCB) + c / NCB. One external
//     memory beat carries up to MEM_BEAT consecutive pixels of a patch row.
//     Their physical columns are consecutive modulo N = 2R+1. NCB divides N
//     and is at least MEM_BEAT, so those columns always land in different
//     banks, even across the wrap from column N-1 to column 0. A whole beat
//     is therefore written in one cycle, and the buffer keeps up with the
//     memory.
//   * Replication, for the read side: NRD copies of the column banks, every
//     write going to all copies. Copy k serves read port k, so NRD pixels
//     (two sampling pairs for NRD = 4) are read per cycle without conflicts.
//
// Columns are addressed physically: the fetch controller keeps a circular
// column pointer so that columns shared with the previous patch are not
// fetched again.
//
// Interface: write lane j (we[j], wcol[j], wdata[j], all lanes in row wrow)
// takes effect at the clock edge; lanes written in the same cycle must be
// in different column banks (checked by an assertion). Read port k returns
// the pixel at (rrow[k], rcol[k]) one cycle after re; a location written in
// the same cycle returns its old value.
//
// With R = 22 and NRD = 4 the storage is 4 x 45 x 45 bytes = 64.8 kbit, the
// local patch buffer size of the published design, which organises the
// buffer as multi-bank SRAM to match the DRAM transfer rate and to raise the
// pixel-pair read bandwidth. The split into NCB = 5 column banks times four
// read copies is this design's reading of that organisation.
module patch_buffer
  import orb_pkg::*;
#(
  parameter int unsigned R   = 22,
  parameter int unsigned NRD = 4,
  parameter int unsigned NCB = 5
) (
  input  logic       clk,
  input  logic       we    [MEM_BEAT],
  input  logic [5:0] wrow,
  input  logic [5:0] wcol  [MEM_BEAT],
  input  beat_t      wdata,
  input  logic       re,
  input  logic [5:0] rrow  [NRD],
  input  logic [5:0] rcol  [NRD],
  output pix_t       rdata [NRD]
);
  localparam int unsigned N  = 2 * R + 1;
  localparam int unsigned NC = N / NCB;             // columns per bank
  localparam int unsigned AW = $clog2(N * NC);
  localparam int unsigned BW = $clog2(NCB);

  if (N % NCB != 0 || NCB < MEM_BEAT) begin : g_bad_ncb
    $error("patch_buffer: NCB must divide 2R+1 and be at least MEM_BEAT");
  end

  // Write side: at most one lane per column bank in any cycle.
  logic          bwe   [NCB];
  logic [AW-1:0] bwadr [NCB];
  pix_t          bwdat [NCB];
  always_comb begin
    for (int b = 0; b < NCB; b++) begin
      bwe[b]   = 1'b0;
      bwadr[b] = '0;
      bwdat[b] = '0;
      for (int j = 0; j < MEM_BEAT; j++) begin
        if (we[j] && int'(wcol[j]) % NCB == b) begin
          bwe[b]   = 1'b1;
          bwadr[b] = AW'(int'(wrow) * NC + int'(wcol[j]) / NCB);
          bwdat[b] = wdata[j];
        end
      end
    end
  end

  for (genvar k = 0; k < NRD; k++) begin : g_copy
    logic [AW-1:0] radr;
    logic [BW-1:0] rbank, rbank_q;
    pix_t          bout [NCB];
    assign radr  = AW'(int'(rrow[k]) * NC + int'(rcol[k]) / NCB);
    assign rbank = BW'(int'(rcol[k]) % NCB);

    for (genvar b = 0; b < NCB; b++) begin : g_bank
      pix_t mem [N * NC];
      always_ff @(posedge clk) begin
        if (bwe[b]) mem[bwadr[b]] <= bwdat[b];
        if (re)     bout[b] <= mem[radr];
      end
    end

    always_ff @(posedge clk)
      if (re) rbank_q <= rbank;
    assign rdata[k] = bout[rbank_q];
  end

  // Lanes written together must fall into different column banks.
  for (genvar i = 0; i < MEM_BEAT; i++) begin : g_chk_i
    for (genvar j = i + 1; j < MEM_BEAT; j++) begin : g_chk_j
      a_lane_banks: assert property (@(posedge clk)
        we[i] && we[j] |-> int'(wcol[i]) % NCB != int'(wcol[j]) % NCB);
    end
  end

endmodule
