// tb_chunk_processor_narrow: the chunk processor test on an image only one
// chunk wide, where the single chunk of a row takes both image edges.
//
// Otherwise as tb_chunk_processor, which feeds 3-pixel columns of a test image to the chunk
// processor and checks every kernel of every chunk, the chunk number, the
// centre row and the clock on which chunk_valid rises. With one column per
// clock a chunk must follow the first column of the next chunk by exactly two
// clocks, which makes chunk_valid repeat every 15 clocks (14 before the last
// chunk of a row). A second pass sends the columns with random gaps.
module tb_chunk_processor_narrow;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  localparam int W = 15, H = 20;
  localparam int XW = $clog2(W), YW = $clog2(H + 1);
  localparam int NCH = W / 15;
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;

  logic clk = 0, rst = 1;
  logic col_valid = 0, col_last = 0;
  column_t col = '0;
  logic [XW-1:0] col_x = '0;
  logic [YW-1:0] col_y = '0;
  logic chunk_valid;
  chunk_kernels_t kernels;
  logic [CW-1:0] chunk_idx;
  logic [YW-1:0] chunk_row;

  int checks = 0, failures = 0, chunks = 0;
  int cycle = 0;
  int intervals15 = 0, intervals14 = 0, last_cv = -1;

  typedef struct { int at; int row; int idx; int seed; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  chunk_processor #(.WIDTH(W), .HEIGHT(H)) dut (.clk, .rst, .col_valid, .col, .col_x, .col_y,
    .col_last, .chunk_valid, .kernels, .chunk_idx, .chunk_row);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker: runs just after each rising edge.
  always @(posedge clk) begin
    #2;
    if (!rst && chunk_valid) begin
      exp_t e;
      chunks++;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected chunk at cycle %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (e.at != cycle || int'(chunk_row) != e.row || int'(chunk_idx) != e.idx) begin
          failures++;
          $display("chunk timing/tag: cycle %0d exp %0d, row %0d exp %0d, idx %0d exp %0d",
                   cycle, e.at, chunk_row, e.row, chunk_idx, e.idx);
        end
        for (int k = 0; k < 15; k++) begin
          checks++;
          if (kernels[k] != ref_kernel(15 * e.idx + k, e.row, W, e.seed)) begin
            failures++;
            $display("kernel %0d of chunk %0d row %0d wrong", k, e.idx, e.row);
          end
        end
      end
      if (last_cv >= 0 && cycle - last_cv == 15) intervals15++;
      if (last_cv >= 0 && cycle - last_cv == 14) intervals14++;
      last_cv = cycle;
    end
  end

  task automatic send_row(int y, int seed, bit gaps);
    for (int x = 0; x < W; x++) begin
      @(negedge clk);
      col_valid = 1;
      for (int r = 0; r < 3; r++) col[r] = img(x, y + r - 1, seed);
      col_x = XW'(x); col_y = YW'(y); col_last = (x == W - 1);
      // cycle counts the edge about to come as cycle; the chunk is checked
      // after edge cycle + 2.
      if (x % 15 == 0 && x != 0) expq.push_back('{cycle + 2, y, x / 15 - 1, seed});
      if (x == W - 1)           expq.push_back('{cycle + 2, y, NCH - 1, seed});
      @(posedge clk);
      if (gaps) begin
        int n = $urandom_range(0, 3);
        @(negedge clk); col_valid = 0;
        repeat (n) @(negedge clk);
        #0;
      end
    end
    @(negedge clk); col_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int y = 1; y < 5; y++) send_row(y, 3, 1'b0);
    repeat (5) @(posedge clk);
    for (int y = 1; y < 4; y++) send_row(y, 4, 1'b1);
    repeat (5) @(posedge clk);
    checks++;
    if (chunks != 7 * NCH || expq.size() != 0) begin
      failures++; $display("chunk count %0d, %0d missing", chunks, expq.size());
    end
    checks++;
    if (NCH > 1 && (intervals15 == 0 || intervals14 == 0)) begin
      failures++; $display("interval 15 seen %0d, 14 seen %0d", intervals15, intervals14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
