// tb_kernel_processor_array: chunks of fifteen random kernels, each checked
// kernel by kernel against the integer Sobel reference; all fifteen results
// must be valid together exactly three clocks after the chunk.
module tb_kernel_processor_array;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  chunk_kernels_t kernels = '0;
  logic q_valid;
  chunk_pixels_t q;
  grad_pix_t [CHUNK_W-1:0] gx, gy;
  mag_pix_t [CHUNK_W-1:0] mag;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { int at; chunk_kernels_t k; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  kernel_processor_array dut (.clk, .rst, .in_valid, .kernels, .q_valid, .q, .gx, .gy, .mag);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (!rst && q_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected result at %0d", cycle);
      end else begin
        e = expq.pop_front();
        if (e.at != cycle) begin failures++; $display("latency: at %0d exp %0d", cycle, e.at); end
        for (int kk = 0; kk < CHUNK_W; kk++) begin
          sobel_ref_t s;
          s = ref_sobel(e.k[kk]);
          for (int ch = 0; ch < CHANNELS; ch++) begin
            checks++;
            if (int'(gx[kk][ch]) != s.gx[ch] || int'(gy[kk][ch]) != s.gy[ch] ||
                int'(mag[kk][ch]) != s.mag[ch] || int'(q[kk][ch]) != s.q[ch]) begin
              failures++;
              $display("kernel %0d ch %0d wrong: q %0d exp %0d", kk, ch, q[kk][ch], s.q[ch]);
            end
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 60; i++) begin
      @(negedge clk);
      in_valid = 1;
      for (int kk = 0; kk < CHUNK_W; kk++) kernels[kk] = rand_kernel();
      expq.push_back('{cycle + 3, kernels});
      @(negedge clk); in_valid = 0;
      repeat ($urandom_range(0, 14)) @(negedge clk);
    end
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
