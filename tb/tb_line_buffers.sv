// tb_line_buffers: streams small frames through the row buffers and checks
// every column against the test image. Pixels come with random gaps; each
// column must appear exactly one clock after its bottom pixel. A frame cut off
// by vsync in mid-row, an extra row beyond HEIGHT, a second frame with
// different content and pixels sent after reset but before the first vsync
// (which must be ignored) are included.
module tb_line_buffers;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  localparam int W = 30, H = 8;
  localparam int XW = $clog2(W), YW = $clog2(H + 1);

  logic clk = 0, rst = 1, vsync = 0, in_valid = 0;
  pixel_t in_pix = '0;
  logic col_valid, col_last;
  column_t col;
  logic [XW-1:0] col_x;
  logic [YW-1:0] col_y;
  int checks = 0, failures = 0, ncols = 0;

  always #5 clk = ~clk;

  line_buffers #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .rst, .vsync, .in_valid, .in_pix,
    .col_valid, .col, .col_x, .col_y, .col_last);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int x, int y, int seed, bit gaps);
    @(negedge clk);
    in_valid = 1; in_pix = img(x, y, seed);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (y >= 2 && y < H) begin
      ncols++;
      if (!col_valid || col_x != XW'(x) || col_y != YW'(y - 1) || col_last != (x == W - 1) ||
          col[0] != img(x, y - 2, seed) || col[1] != img(x, y - 1, seed) || col[2] != img(x, y, seed)) begin
        failures++;
        $display("column mismatch at x=%0d y=%0d: valid=%0b x=%0d y=%0d", x, y, col_valid, col_x, col_y);
      end
    end else if (col_valid) begin
      failures++;
      $display("unexpected column at x=%0d y=%0d", x, y);
    end
    if (gaps) begin
      int n = $urandom_range(0, 2);
      repeat (n) begin
        @(posedge clk); #1;
        checks++;
        if (col_valid) begin failures++; $display("column without pixel"); end
      end
    end
  endtask

  task automatic frame_start();
    @(negedge clk); vsync = 1;
    repeat (3) @(negedge clk);
    vsync = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // Pixels before the first vsync after reset must be ignored.
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < W; x++) send(x, y + H, 6, 1'b0);
    // A partial frame, abandoned in row 3.
    frame_start();
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < (y == 3 ? 11 : W); x++) send(x, y, 5, 1'b0);
    // A full frame with gaps and one row too many.
    frame_start();
    for (int y = 0; y < H + 1; y++)
      for (int x = 0; x < W; x++) send(x, y, 1, 1'b1);
    // A second frame back to back with different content.
    frame_start();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) send(x, y, 2, 1'b0);
    checks++;
    if (ncols != 2 * (W * (H - 2)) + W + 11) begin
      failures++;
      $display("column count %0d", ncols);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
