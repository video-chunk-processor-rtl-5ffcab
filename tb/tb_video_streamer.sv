// tb_video_streamer: sends chunks of fifteen random pixels at the spacings
// the chunk pipeline produces (15 clocks, 14 clocks before the last chunk of
// a row, longer gaps between rows) and checks that the pixels come out one
// per clock, in order, without gaps inside a run of chunks, with out_first on
// each chunk's first pixel and, from idle, one clock after the chunk.
module tb_video_streamer;
  import vcp_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  chunk_pixels_t in_q = '0;
  logic out_valid, out_first;
  pixel_t out_pix;
  int checks = 0, failures = 0, cycle = 0, held = 0;

  pixel_t   pixq[$];
  bit       firstq[$];
  int       idle_start[$];   // clock on which a chunk sent to an idle streamer must start

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  video_streamer dut (.clk, .rst, .in_valid, .in_q, .out_valid, .out_first, .out_pix);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (!rst && out_valid) begin
      checks++;
      if (pixq.size() == 0) begin
        failures++; $display("unexpected pixel at %0d", cycle);
      end else begin
        pixel_t p;
        bit f;
        p = pixq.pop_front();
        f = firstq.pop_front();
        if (out_pix != p || out_first != f) begin
          failures++; $display("pixel %h exp %h first %0b exp %0b at %0d", out_pix, p, out_first, f, cycle);
        end
        if (f && idle_start.size() != 0 && idle_start[0] <= cycle) begin
          int s;
          s = idle_start.pop_front();
          checks++;
          if (s != cycle) begin failures++; $display("start at %0d exp %0d", cycle, s); end
        end
      end
    end else if (!rst && pixq.size() != 0) begin
      // A chunk has been taken but its pixels are not flowing.
      checks++;
      failures++;
      $display("gap at %0d", cycle);
    end
  end

  task automatic send(bit from_idle);
    @(negedge clk);
    in_valid = 1;
    for (int i = 0; i < CHUNK_W; i++) begin
      in_q[i] = pixel_t'($urandom);
      pixq.push_back(in_q[i]);
      firstq.push_back(i == 0);
    end
    if (from_idle) idle_start.push_back(cycle + 1);
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int row = 0; row < 20; row++) begin
      int n = $urandom_range(2, 6);
      for (int c = 0; c < n; c++) begin
        send(c == 0);
        // next chunk 15 clocks later, 14 before the row's last chunk
        repeat ((c == n - 2) ? 12 : 13) @(negedge clk);
        if (c == n - 2) held++;
      end
      repeat ($urandom_range(2, 30)) @(negedge clk);
    end
    repeat (40) @(posedge clk);
    checks++;
    if (pixq.size() != 0 || held == 0) begin failures++; $display("%0d pixels missing", pixq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
