// tb_vcp_top_full: one complete Full-HD frame through the design at its
// default size (1920 x 1080), with Full-HD video timing: 2200 pixel clocks
// per line of which 1920 carry pixels, and a vertical sync before the frame.
// The whole serial output (1078 rows of 1920 edge pixels) is compared with
// the reference Sobel image. It also checks that chunk_valid comes every 15
// pixel clocks inside a row (101.01 ns at 148.5 MHz), 128 times per row, and
// how long after the frame's first pixel the first chunk appears.
module tb_vcp_top_full;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  localparam int W = 1920, H = 1080, LINE = 2200, SEED = 9;

  logic clk = 0, rst = 1;
  logic in_sel = 1, test_sel = 0;
  logic cam_vsync = 0, cam_valid = 0, hdmi_vsync = 0, hdmi_valid = 0, test_valid = 0;
  pixel_t cam_pix = '0, hdmi_pix = '0;
  chunk_kernels_t test_kernels = '0;

  logic chunk_valid, q_valid, out_valid, out_first;
  chunk_kernels_t kernels;
  logic [$clog2(W/15)-1:0] chunk_idx;
  logic [$clog2(H+1)-1:0] chunk_row;
  chunk_pixels_t q;
  grad_pix_t [CHUNK_W-1:0] gx, gy;
  mag_pix_t [CHUNK_W-1:0] mag;
  pixel_t out_pix;

  vcp_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_chunks = 0, n_gap15 = 0, n_gap14 = 0, last_cv = -1, first_pix = -1, first_cv = -1;
  int ox = 0, oy = 1, npix = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (H * LINE + 20 * LINE) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (!rst && chunk_valid) begin
      n_chunks++;
      if (first_cv < 0) first_cv = cycle;
      if (last_cv >= 0 && cycle - last_cv == 15) n_gap15++;
      if (last_cv >= 0 && cycle - last_cv == 14) n_gap14++;
      last_cv = cycle;
    end
    if (!rst && out_valid) begin
      sobel_ref_t s;
      pixel_t p;
      s = ref_sobel(ref_kernel(ox, oy, W, SEED));
      for (int ch = 0; ch < CHANNELS; ch++) p[ch] = chan_t'(s.q[ch]);
      checks++;
      npix++;
      if (out_pix != p) begin
        failures++;
        if (failures < 10) $display("pixel (%0d,%0d) %h exp %h", ox, oy, out_pix, p);
      end
      if (ox == W - 1) begin ox = 0; oy++; end else ox++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); hdmi_vsync = 1;
    repeat (5 * LINE) @(negedge clk);
    hdmi_vsync = 0;
    repeat (LINE - W) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        hdmi_valid = 1; hdmi_pix = img(x, y, SEED);
        if (first_pix < 0) first_pix = cycle + 1;
        @(negedge clk);
      end
      hdmi_valid = 0;
      repeat (LINE - W) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (npix != W * (H - 2)) begin failures++; $display("%0d output pixels", npix); end
    checks++;
    if (n_chunks != (W / 15) * (H - 2) || n_gap15 != (W / 15 - 2) * (H - 2) || n_gap14 != H - 2) begin
      failures++; $display("chunks %0d, 15-clock spacings %0d, 14-clock %0d", n_chunks, n_gap15, n_gap14);
    end
    // First chunk: pixel (15, 2) enters 2 lines + 15 pixels after the first pixel,
    // chunk_valid follows it by 3 more clocks.
    checks++;
    if (first_cv - first_pix != 2 * LINE + 15 + 3) begin
      failures++; $display("first chunk after %0d clocks", first_cv - first_pix);
    end
    $display("first chunk_valid %0d pixel clocks after the first pixel (%0.1f ns at 148.5 MHz)",
             first_cv - first_pix, (first_cv - first_pix) * 1000.0 / 148.5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
