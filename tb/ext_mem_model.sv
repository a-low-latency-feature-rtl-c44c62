// ext_mem_model: behavioural model of the external DRAM for the testbenches.
//
// A byte array of SIZE entries, initialised to a fixed pattern
// (a * 37 + a / 256) mod 256. NW write ports (one per scale) write a byte
// per cycle when valid. The read port accepts one burst request
// (address, length) when req_ready, which is high with probability
// READY_PCT percent, queues it, and returns its bytes in order as beats of
// four: beat i of a burst holds bytes address + 4i .. address + 4i + 3 in
// lanes 0..3 (lanes past the burst end carry the following bytes and are
// ignored by the reader). One beat per cycle, with random one-cycle gaps
// (GAP_PCT percent). Not synthesizable.
module ext_mem_model #(
  parameter int SIZE      = 65536,
  parameter int NW        = 3,
  parameter int READY_PCT = 70,
  parameter int GAP_PCT   = 20
) (
  input  logic        clk,
  input  logic        wr_valid [NW],
  input  logic [31:0] wr_addr  [NW],
  input  logic [7:0]  wr_data  [NW],
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [31:0] req_addr,
  input  logic [5:0]  req_len,
  output logic        rsp_valid,
  output logic [31:0] rsp_data
);
  logic [7:0] mem [SIZE];
  int unsigned pend_addr [$];
  int reads = 0;

  initial begin
    for (int a = 0; a < SIZE; a++) mem[a] = 8'((a * 37 + a / 256) % 256);
    req_ready = 0;
    rsp_valid = 0;
    rsp_data  = 0;
  end

  always @(posedge clk) begin
    for (int k = 0; k < NW; k++)
      if (wr_valid[k] && wr_addr[k] < SIZE) mem[wr_addr[k]] <= wr_data[k];
    if (req_valid && req_ready)
      for (int i = 0; i < int'(req_len); i += 4) pend_addr.push_back(req_addr + i);
    if (pend_addr.size() != 0 && ($urandom % 100) >= GAP_PCT) begin
      int unsigned a;
      a = pend_addr.pop_front();
      rsp_valid <= 1;
      for (int j = 0; j < 4; j++)
        rsp_data[8*j +: 8] <= (a + j < SIZE) ? mem[a + j] : 8'h00;
      reads++;
    end else begin
      rsp_valid <= 0;
    end
    req_ready <= ($urandom % 100) < READY_PCT;
  end
endmodule
