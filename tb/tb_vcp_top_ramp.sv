// tb_vcp_top_ramp: the horizontal-ramp case of the reference simulation.
//
// Every pixel of the frame (all rows, all channels) holds 0x1E plus its column,
// so the value grows by one per column. Kernel k of a chunk must then hold the
// columns k-1, k and k+1 of that chunk in all three rows, every interior
// kernel must give gx = 8, gy = 0 and magnitude 8, and the two kernels at the
// image's left and right edges (where the edge column is replicated) gx = 4.
// chunk_valid must repeat every 15 clocks along a row (101.01 ns at a
// 148.5 MHz pixel clock). The expected values are worked out here by hand
// from the ramp, not from the shared reference model.
module tb_vcp_top_ramp;
  import vcp_pkg::*;

  localparam int W = 45, H = 6, NCH = W / 15;

  logic clk = 0, rst = 1;
  logic in_sel = 1, test_sel = 0;
  logic cam_vsync = 0, cam_valid = 0, hdmi_vsync = 0, hdmi_valid = 0, test_valid = 0;
  pixel_t cam_pix = '0, hdmi_pix = '0;
  chunk_kernels_t test_kernels = '0;

  logic chunk_valid, q_valid, out_valid, out_first;
  chunk_kernels_t kernels;
  logic [$clog2(NCH)-1:0] chunk_idx;
  logic [$clog2(H+1)-1:0] chunk_row;
  chunk_pixels_t q;
  grad_pix_t [CHUNK_W-1:0] gx, gy;
  mag_pix_t [CHUNK_W-1:0] mag;
  pixel_t out_pix;

  vcp_top #(.WIDTH(W), .HEIGHT(H)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_chunks = 0, n_results = 0, n_gap15 = 0, last_cv = -1;
  int idxq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic chan_t ramp(int x);
    if (x < 0) x = 0;
    if (x > W - 1) x = W - 1;
    return chan_t'(8'h1E + x);
  endfunction

  always @(posedge clk) begin
    #2;
    if (!rst && chunk_valid) begin
      n_chunks++;
      idxq.push_back(int'(chunk_idx));
      for (int k = 0; k < CHUNK_W; k++) begin
        int xc;
        xc = 15 * int'(chunk_idx) + k;
        checks++;
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            for (int ch = 0; ch < CHANNELS; ch++)
              if (kernels[k][r][c][ch] != ramp(xc + c - 1)) begin
                failures++;
                $display("chunk %0d kernel %0d [%0d][%0d] = %h exp %h", chunk_idx, k, r, c,
                         kernels[k][r][c][ch], ramp(xc + c - 1));
              end
      end
      if (last_cv >= 0 && cycle - last_cv == 15) n_gap15++;
      last_cv = cycle;
    end
    if (!rst && q_valid) begin
      int idx;
      n_results++;
      idx = idxq.pop_front();
      for (int k = 0; k < CHUNK_W; k++) begin
        int xc, egx;
        xc  = 15 * idx + k;
        egx = (xc == 0 || xc == W - 1) ? 4 : 8;
        for (int ch = 0; ch < CHANNELS; ch++) begin
          checks++;
          if (int'(gx[k][ch]) != egx || int'(gy[k][ch]) != 0 || int'(mag[k][ch]) != egx ||
              int'(q[k][ch]) != egx) begin
            failures++;
            $display("column %0d: gx %0d gy %0d mag %0d q %0d, exp gx %0d", xc, gx[k][ch], gy[k][ch],
                     mag[k][ch], q[k][ch], egx);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk); hdmi_vsync = 1;
    repeat (3) @(negedge clk);
    hdmi_vsync = 0;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        hdmi_valid = 1;
        for (int ch = 0; ch < CHANNELS; ch++) hdmi_pix[ch] = ramp(x);
        @(negedge clk);
      end
      hdmi_valid = 0;
      repeat (10) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (n_chunks != NCH * (H - 2) || n_results != n_chunks || n_gap15 != (NCH - 2) * (H - 2)) begin
      failures++;
      $display("chunks %0d results %0d 15-clock spacings %0d", n_chunks, n_results, n_gap15);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
