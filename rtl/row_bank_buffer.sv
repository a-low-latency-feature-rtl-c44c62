// row_bank_buffer: multi-bank line buffer of one scale.
//
// Each bank holds one full image row. Pixels arrive in raster order, one per
// cycle at most (in_valid). For every accepted pixel at column x of row y the
// buffer reads column x of all banks (read before write, so the bank that is
// about to be overwritten still returns row y-NBANKS) and writes the new pixel
// into bank y mod NBANKS. One cycle later it presents a full pixel column:
// col[0] is row y, col[k] is row y-k, k = 1..NBANKS, together with the x and y
// of that column. Rows above the top of the image hold whatever was stored
// before and are qualified downstream by y.
//
// The banks-per-row organisation follows the published design; the published
// memory budget corresponds to seven row banks per scale. Here NBANKS stored
// rows plus the live input row form the NBANKS+1 rows of the window, so six
// banks feed the 7x7 register file.
module row_bank_buffer
  import orb_pkg::*;
#(
  parameter int unsigned W      = 1920,
  parameter int unsigned H      = 1080,
  parameter int unsigned NBANKS = 6
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  pix_t                 in_pix,
  output logic                 col_valid,
  output pix_t                 col [NBANKS+1],
  output logic [COORD_W-1:0]   col_x,
  output logic [COORD_W-1:0]   col_y
);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned BW = (NBANKS > 1) ? $clog2(NBANKS) : 1;

  pix_t bank [NBANKS][W];

  logic [COORD_W-1:0] x, y;
  logic [BW-1:0]      wbank;    // y mod NBANKS

  // Raster position of the incoming pixel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      wbank <= '0;
    end else if (in_valid) begin
      if (x == COORD_W'(W - 1)) begin
        x <= '0;
        if (y == COORD_W'(H - 1)) begin
          y     <= '0;
          wbank <= '0;
        end else begin
          y     <= y + 1'b1;
          wbank <= (wbank == BW'(NBANKS - 1)) ? '0 : wbank + 1'b1;
        end
      end else begin
        x <= x + 1'b1;
      end
    end
  end
  // Banks: synchronous read of every bank, write into the current row's bank.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      // Read every bank before the write of this cycle lands.
      for (int k = 1; k <= NBANKS; k++) begin
        col[k] <= bank[(int'(wbank) + NBANKS - k) % NBANKS][x[XW-1:0]];
      end
      col[0] <= in_pix;
      bank[wbank][x[XW-1:0]] <= in_pix;
      col_x <= x;
      col_y <= y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) col_valid <= 1'b0;
    else        col_valid <= in_valid;
  end

endmodule
