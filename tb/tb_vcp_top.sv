// tb_vcp_top: end-to-end test of the video chunk processor on small frames.
//
// Frames of a deterministic test image enter through either video source;
// the serial output stream must equal the Sobel edge image computed by the
// reference model (edge-replicated left and right, centre rows 1..H-2), pixel
// for pixel and in order. The kernels of every chunk, the chunk number and
// row, the clock on which each chunk_valid rises (three clocks after the edge
// that samples the pixel completing the chunk) and the three-clock kernel-processor latency are
// checked as well. The run covers, and counts: chunks with a 15-clock
// spacing, the shorter spacing before a row's last chunk (which makes the
// streamer hold a chunk), left and right boundary kernels, both input
// sources, a frame cut short by vsync, pixel gaps, and test kernels injected
// through the test multiplexer. A mechanism that never happens is a failure.
module tb_vcp_top;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  localparam int W = 45, H = 7;
  localparam int XW = $clog2(W), YW = $clog2(H + 1);
  localparam int NCH = W / 15;
  localparam int CW = (NCH > 1) ? $clog2(NCH) : 1;

  logic clk = 0, rst = 1;
  logic in_sel = 1, test_sel = 0;
  logic cam_vsync = 0, cam_valid = 0, hdmi_vsync = 0, hdmi_valid = 0, test_valid = 0;
  pixel_t cam_pix = '0, hdmi_pix = '0;
  chunk_kernels_t test_kernels = '0;

  logic chunk_valid, q_valid, out_valid, out_first;
  chunk_kernels_t kernels;
  logic [CW-1:0] chunk_idx;
  logic [YW-1:0] chunk_row;
  chunk_pixels_t q;
  grad_pix_t [CHUNK_W-1:0] gx, gy;
  mag_pix_t [CHUNK_W-1:0] mag;
  pixel_t out_pix;

  vcp_top #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  // mechanism counters
  int n_chunks = 0, n_gap15 = 0, n_gap14 = 0, n_left = 0, n_right = 0;
  int n_cam_frames = 0, n_hdmi_frames = 0, n_cut = 0, n_pix_gaps = 0, n_test = 0;
  int last_cv = -1;

  typedef struct { int at; int row; int idx; int seed; bit test; chunk_kernels_t k; } exp_t;
  exp_t chunkq[$];       // expected chunk_valid events
  exp_t kpq[$];          // expected q_valid events
  pixel_t pixq[$];       // expected serial output

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chunk_kernels_t ref_chunk(int idx, int row, int seed);
    chunk_kernels_t ck;
    for (int k = 0; k < CHUNK_W; k++) ck[k] = ref_kernel(15 * idx + k, row, W, seed);
    return ck;
  endfunction

  task automatic expect_chunk(int at, int row, int idx, int seed);
    exp_t e;
    chunk_kernels_t ck;
    ck = ref_chunk(idx, row, seed);
    e = '{at, row, idx, seed, 1'b0, ck};
    chunkq.push_back(e);
    e.at = at + 3;
    kpq.push_back(e);
    for (int k = 0; k < CHUNK_W; k++) begin
      sobel_ref_t s;
      pixel_t p;
      s = ref_sobel(ck[k]);
      for (int ch = 0; ch < CHANNELS; ch++) p[ch] = chan_t'(s.q[ch]);
      pixq.push_back(p);
    end
  endtask

  // Checkers, just after each rising edge.
  always @(posedge clk) begin
    #2;
    if (!rst && chunk_valid) begin
      exp_t e;
      n_chunks++;
      checks++;
      if (chunkq.size() == 0) begin
        failures++; $display("unexpected chunk_valid at %0d", cycle);
      end else begin
        e = chunkq.pop_front();
        if (e.at != cycle || int'(chunk_idx) != e.idx || int'(chunk_row) != e.row || kernels != e.k) begin
          failures++;
          $display("chunk at %0d (exp %0d) idx %0d/%0d row %0d/%0d kernels %s", cycle, e.at,
                   chunk_idx, e.idx, chunk_row, e.row, kernels == e.k ? "ok" : "wrong");
        end
        if (e.idx == 0) n_left++;
        if (e.idx == NCH - 1) n_right++;
      end
      if (last_cv >= 0 && cycle - last_cv == 15) n_gap15++;
      if (last_cv >= 0 && cycle - last_cv == 14) n_gap14++;
      last_cv = cycle;
    end
    if (!rst && q_valid) begin
      exp_t e;
      checks++;
      if (kpq.size() == 0) begin
        failures++; $display("unexpected q_valid at %0d", cycle);
      end else begin
        e = kpq.pop_front();
        if (!e.test && e.at != cycle) begin failures++; $display("q_valid at %0d exp %0d", cycle, e.at); end
        for (int k = 0; k < CHUNK_W; k++) begin
          sobel_ref_t s;
          s = ref_sobel(e.k[k]);
          for (int ch = 0; ch < CHANNELS; ch++) begin
            checks++;
            if (int'(q[k][ch]) != s.q[ch] || int'(gx[k][ch]) != s.gx[ch] ||
                int'(gy[k][ch]) != s.gy[ch] || int'(mag[k][ch]) != s.mag[ch]) begin
              failures++; $display("kernel processor %0d ch %0d wrong at %0d", k, ch, cycle);
            end
          end
        end
      end
    end
    if (!rst && out_valid) begin
      pixel_t p;
      checks++;
      if (pixq.size() == 0) begin
        failures++; $display("unexpected output pixel at %0d", cycle);
      end else begin
        p = pixq.pop_front();
        if (out_pix != p) begin failures++; $display("output pixel %h exp %h at %0d", out_pix, p, cycle); end
      end
    end
  end

  // Drive one pixel through the selected source.
  task automatic drive(bit src, bit vs, bit v, pixel_t p);
    @(negedge clk);
    if (src) begin hdmi_vsync = vs; hdmi_valid = v; hdmi_pix = p; end
    else     begin cam_vsync  = vs; cam_valid  = v; cam_pix  = p; end
  endtask

  task automatic idle(bit src, int n);
    repeat (n) drive(src, 1'b0, 1'b0, '0);
  endtask

  task automatic frame(bit src, int seed, int rows, int cut_at, bit gaps);
    in_sel = src;
    repeat (3) drive(src, 1'b1, 1'b0, '0);   // vertical sync
    idle(src, 4);
    for (int y = 0; y < rows; y++) begin
      for (int x = 0; x < W; x++) begin
        if (y == rows - 1 && x == cut_at) return;
        drive(src, 1'b0, 1'b1, img(x, y, seed));
        // This pixel enters on the next edge, numbered cycle + 1.
        if (y >= 2 && y < H) begin
          if (x % 15 == 0 && x != 0) expect_chunk(cycle + 4, y - 1, x / 15 - 1, seed);
          if (x == W - 1)           expect_chunk(cycle + 4, y - 1, NCH - 1, seed);
        end
        if (gaps && $urandom_range(0, 5) == 0) begin
          idle(src, $urandom_range(1, 3));
          n_pix_gaps++;
        end
      end
      idle(src, 8);                            // horizontal blanking
    end
    idle(src, 1);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // HDMI frame, abandoned part-way through row 4.
    frame(1'b1, 7, 5, 20, 1'b0);
    n_cut++;
    // Complete HDMI frame, then a complete camera frame with pixel gaps.
    frame(1'b1, 1, H, -1, 1'b0);
    n_hdmi_frames++;
    frame(1'b0, 2, H, -1, 1'b1);
    n_cam_frames++;
    idle(1'b0, 40);
    // Test kernels through the test multiplexer.
    test_sel = 1;
    for (int i = 0; i < 6; i++) begin
      exp_t e;
      @(negedge clk);
      test_valid = 1;
      for (int k = 0; k < CHUNK_W; k++) test_kernels[k] = rand_kernel();
      e = '{0, 0, 0, 0, 1'b1, test_kernels};
      kpq.push_back(e);
      for (int k = 0; k < CHUNK_W; k++) begin
        sobel_ref_t s;
        pixel_t p;
        s = ref_sobel(test_kernels[k]);
        for (int ch = 0; ch < CHANNELS; ch++) p[ch] = chan_t'(s.q[ch]);
        pixq.push_back(p);
      end
      @(negedge clk); test_valid = 0;
      repeat (14) @(negedge clk);
      n_test++;
    end
    repeat (40) @(negedge clk);
    test_sel = 0;

    checks++;
    if (chunkq.size() || kpq.size() || pixq.size()) begin
      failures++; $display("missing: %0d chunks, %0d results, %0d pixels", chunkq.size(), kpq.size(), pixq.size());
    end
    $display("mechanisms: chunks=%0d gap15=%0d gap14=%0d left=%0d right=%0d hdmi=%0d cam=%0d cut=%0d gaps=%0d test=%0d",
             n_chunks, n_gap15, n_gap14, n_left, n_right, n_hdmi_frames, n_cam_frames, n_cut, n_pix_gaps, n_test);
    checks++;
    if (n_chunks == 0 || n_gap15 == 0 || n_gap14 == 0 || n_left == 0 || n_right == 0 ||
        n_hdmi_frames == 0 || n_cam_frames == 0 || n_cut == 0 || n_pix_gaps == 0 || n_test == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
