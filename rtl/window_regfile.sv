// window_regfile: 2-D register file holding an N x N pixel window.
//
// Every valid pixel column from the row bank buffer is shifted in on the
// left: win[r][c] is the pixel of row y-r and column x-c, where (x, y) is the
// position of the newest column, reported on win_x / win_y. The window centre
// win[N/2][N/2] is the pixel at (x-N/2, y-N/2). win_valid pulses for one cycle
// after each shift, one cycle after col_valid. Columns are shifted across row
// ends as well; consumers qualify the window with win_x / win_y.
//
// The register file fed in parallel from the row banks follows the published
// design; its size (7x7, enough for the radius-3 FAST ring) is this design's.
module window_regfile
  import orb_pkg::*;
#(
  parameter int unsigned N = 7
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 col_valid,
  input  pix_t                 col [N],
  input  logic [COORD_W-1:0]   col_x,
  input  logic [COORD_W-1:0]   col_y,
  output logic                 win_valid,
  output pix_t                 win [N][N],
  output logic [COORD_W-1:0]   win_x,
  output logic [COORD_W-1:0]   win_y
);
  always_ff @(posedge clk) begin
    if (col_valid) begin
      for (int r = 0; r < N; r++) begin
        win[r][0] <= col[r];
        for (int c = 1; c < N; c++) win[r][c] <= win[r][c-1];
      end
      win_x <= col_x;
      win_y <= col_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) win_valid <= 1'b0;
    else        win_valid <= col_valid;
  end

endmodule
