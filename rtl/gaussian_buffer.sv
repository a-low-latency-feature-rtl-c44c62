// gaussian_buffer: buffer between the smoother of one scale and the external
// memory write port.
//
// The smoother produces one smoothed pixel per input pixel and cannot stall.
// The memory may not accept a write every cycle. This buffer takes up the
// difference: the smoothed pixels queue in a FIFO of DEPTH pixels (two rows
// of the 1920-pixel source by default), and leave through a valid/ready
// write port (wr_valid / wr_ready / wr_addr / wr_data), one pixel per
// accepted cycle.
//
// Only the pixels are stored. The write address is produced on the output
// side. The smoothed pixels of a frame always arrive in raster order over
// the interior 3..W-4 x 3..H-4, so an output position counter (ox, oy)
// follows them: address = BASE + oy * W + ox. rows_done counts the smoothed
// rows that have been completely written to memory in the current frame
// (rows 0..2 hold no smoothed pixels and count as done once row 3 is
// written). It stays at H-3 after the last row of a frame and falls back to
// 0 when the first pixel of the next frame is written. The descriptor stage
// waits on it before it reads a patch. overflow is set
// (sticky until reset) if a pixel arrives while the FIFO is full. The pixel
// is then lost.
//
// The published design has Gaussian image buffers of 92.16 kbit in total.
// Two rows of 1920 pixels per scale for three scales is this design's
// reading of that size. The FIFO organisation, the handshake, and the
// output-side address generation are this design's choices.
module gaussian_buffer
  import orb_pkg::*;
#(
  parameter int unsigned W     = 1920,
  parameter int unsigned H     = 1080,
  parameter int unsigned DEPTH = 3840,
  parameter int unsigned BASE  = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // smoothed pixels, raster order over the interior of the frame
  input  logic               in_valid,
  input  pix_t               in_pix,
  // external memory write port
  output logic               wr_valid,
  input  logic               wr_ready,
  output logic [ADDR_W-1:0]  wr_addr,
  output pix_t               wr_data,
  // status
  output logic [COORD_W-1:0] rows_done,
  output logic               overflow
);
  logic                   in_ready;
  logic [$clog2(DEPTH):0] fill;

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_valid(in_valid), .wr_ready(in_ready), .wr_data(in_pix),
    .rd_valid(wr_valid), .rd_ready(wr_ready), .rd_data(wr_data),
    .count(fill), .overflow
  );

  // Output position and address of the pixel at the head of the FIFO.
  logic [COORD_W-1:0] ox, oy;
  localparam logic [ADDR_W-1:0] FIRST = ADDR_W'(BASE + 3 * W + 3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ox        <= COORD_W'(3);
      oy        <= COORD_W'(3);
      wr_addr   <= FIRST;
      rows_done <= '0;
    end else if (wr_valid && wr_ready) begin
      if (ox == COORD_W'(W - 4)) begin
        ox        <= COORD_W'(3);
        rows_done <= oy + 1'b1;
        if (oy == COORD_W'(H - 4)) begin
          oy      <= COORD_W'(3);
          wr_addr <= FIRST;
        end else begin
          oy      <= oy + 1'b1;
          wr_addr <= wr_addr + ADDR_W'(7);
        end
      end else begin
        if (ox == COORD_W'(3) && oy == COORD_W'(3)) rows_done <= '0;
        ox      <= ox + 1'b1;
        wr_addr <= wr_addr + 1'b1;
      end
    end
  end

  // The FIFO never refuses a pixel unless it is full, which overflow records.
  a_fill_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                 int'(fill) <= DEPTH);

endmodule
