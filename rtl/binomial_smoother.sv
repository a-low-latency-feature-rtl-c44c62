// binomial_smoother: 5x5 binomial (Gaussian-like) image smoothing.
//
// The kernel is the outer product of [1 4 6 4 1] with itself (sum 256). The
// multiplications are shift-adds (4a = a<<2, 6a = a<<2 + a<<1) and each pair
// of symmetric pixels is summed before it is weighted: first down each of the
// five columns, then across the five column sums. The result is rounded
// (+128) and divided by 256 with a shift.
//
// Interface: in_valid with a 5x5 window (w[r][c], r and c = 0..4, centre
// w[2][2]) and its centre position; one cycle later out_valid, the smoothed
// centre pixel and the same position. The kernel and the shift-add scheme
// follow the published design; the rounding and the single pipeline register
// are this design's choices.
module binomial_smoother
  import orb_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 w [5][5],
  input  logic [COORD_W-1:0]   in_x,
  input  logic [COORD_W-1:0]   in_y,
  output logic                 out_valid,
  output pix_t                 out_pix,
  output logic [COORD_W-1:0]   out_x,
  output logic [COORD_W-1:0]   out_y
);
  // Weighted sum of five values with weights 1 4 6 4 1; symmetric terms first.
  function automatic logic [15:0] binom5(input logic [11:0] a0, input logic [11:0] a1,
                                         input logic [11:0] a2, input logic [11:0] a3,
                                         input logic [11:0] a4);
    logic [15:0] s04, s13, m;
    s04 = 16'(a0) + 16'(a4);
    s13 = 16'(a1) + 16'(a3);
    m   = 16'(a2);
    return s04 + (s13 << 2) + (m << 2) + (m << 1);
  endfunction

  logic [11:0] colsum [5];
  logic [15:0] total;

  always_comb begin
    for (int c = 0; c < 5; c++) begin
      colsum[c] = 12'(binom5(12'(w[0][c]), 12'(w[1][c]), 12'(w[2][c]),
                             12'(w[3][c]), 12'(w[4][c])));
    end
    total = binom5(colsum[0], colsum[1], colsum[2], colsum[3], colsum[4]);
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_pix <= pix_t'((17'(total) + 17'd128) >> 8);
      out_x   <= in_x;
      out_y   <= in_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
