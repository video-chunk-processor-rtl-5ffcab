// line_buffers: row buffers that turn a serial pixel stream into 3-pixel columns.
//
// Pixels arrive one per clock (when in_valid is high) in raster order, left to
// right and top to bottom. A high vsync restarts the frame: the column and row
// counters return to zero. After reset, pixels are ignored until the first
// vsync, so that a reset released in the middle of a frame does not misplace
// rows. The two most recent complete rows are kept in two
// on-chip RAMs of WIDTH pixels each, used in ping-pong order: row y is written
// into RAM (y mod 2), which at that moment still holds row y-2, while the other
// RAM holds row y-1. Each RAM is read at the column being written, before the
// write (read-first), so a pixel at (x, y) yields the column
// {row y-2, row y-1, row y} at x with no extra storage.
//
// Output: one column per incoming pixel of rows 2..HEIGHT-1, one clock after
// the pixel. col[0] is the top pixel (row y-2), col[1] the centre (row y-1),
// col[2] the bottom (row y). col_x is the column, col_y the centre row, and
// col_last marks the last column of a row. Rows beyond HEIGHT are ignored.
//
// Buffering a few rows on chip instead of a whole frame, and passing columns on
// to the chunk processor, follows the published architecture. The ping-pong
// pair of RAMs, the vsync-driven counters, waiting for the first vsync after
// reset and the one-clock latency are choices of this design.
module line_buffers
  import vcp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  localparam int unsigned XW = $clog2(WIDTH),
  localparam int unsigned YW = $clog2(HEIGHT + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          vsync,
  input  logic          in_valid,
  input  pixel_t        in_pix,
  output logic          col_valid,
  output column_t       col,
  output logic [XW-1:0] col_x,
  output logic [YW-1:0] col_y,
  output logic          col_last
);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          synced;    // a vsync has been seen since reset
  logic          take;      // this pixel belongs to a frame being buffered

  assign take = in_valid && synced && y < YW'(HEIGHT);

  always_ff @(posedge clk) begin
    if (rst)        synced <= 1'b0;
    else if (vsync) synced <= 1'b1;
  end

  // Raster position of the incoming pixel.
  always_ff @(posedge clk) begin
    if (rst || vsync) begin
      x <= '0;
      y <= '0;
    end else if (take) begin
      if (x == XW'(WIDTH - 1)) begin
        x <= '0;
        y <= y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  // Two row RAMs, read-first at the column being written.
  pixel_t ram0 [WIDTH];
  pixel_t ram1 [WIDTH];
  pixel_t q0, q1;

  always_ff @(posedge clk) begin
    if (rst) begin
      q0 <= '0;
    end else if (take) begin
      q0 <= ram0[x];
      if (!y[0]) ram0[x] <= in_pix;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      q1 <= '0;
    end else if (take) begin
      q1 <= ram1[x];
      if (y[0]) ram1[x] <= in_pix;
    end
  end

  // Pixel, position and RAM select delayed to line up with the RAM outputs.
  logic          v_d;
  pixel_t        pix_d;
  logic [XW-1:0] x_d;
  logic [YW-1:0] y_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_d   <= 1'b0;
      pix_d <= '0;
      x_d   <= '0;
      y_d   <= '0;
    end else begin
      v_d   <= take && y >= YW'(2) && !vsync;
      pix_d <= in_pix;
      x_d   <= x;
      y_d   <= y;
    end
  end

  always_comb begin
    col_valid = v_d;
    // RAM (y mod 2) still holds row y-2, the other RAM holds row y-1.
    col[0]    = y_d[0] ? q1 : q0;
    col[1]    = y_d[0] ? q0 : q1;
    col[2]    = pix_d;
    col_x     = x_d;
    col_y     = y_d - 1'b1;
    col_last  = x_d == XW'(WIDTH - 1);
  end

endmodule
