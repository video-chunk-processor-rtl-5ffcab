// tb_sobel_kernel_processor: random and corner-case kernels, one per clock
// with random idle clocks, checked against the integer Sobel reference. Every
// result must appear exactly three clocks after its kernel.
module tb_sobel_kernel_processor;
  import vcp_pkg::*;
  import vcp_tb_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0;
  kernel_t kernel = '0;
  logic out_valid;
  pixel_t q;
  grad_pix_t gx, gy;
  mag_pix_t mag;
  int checks = 0, failures = 0, cycle = 0, nres = 0, nsat = 0;

  typedef struct { int at; kernel_t k; } exp_t;
  exp_t expq[$];

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  sobel_kernel_processor dut (.clk, .rst, .in_valid, .kernel, .out_valid, .q, .gx, .gy, .mag);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (!rst && out_valid) begin
      exp_t e;
      sobel_ref_t s;
      checks++;
      nres++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected result at %0d", cycle);
      end else begin
        e = expq.pop_front();
        s = ref_sobel(e.k);
        if (e.at != cycle) begin failures++; $display("latency: at %0d exp %0d", cycle, e.at); end
        for (int ch = 0; ch < CHANNELS; ch++) begin
          if (s.mag[ch] > 255) nsat++;
          checks++;
          if (int'(gx[ch]) != s.gx[ch] || int'(gy[ch]) != s.gy[ch] ||
              int'(mag[ch]) != s.mag[ch] || int'(q[ch]) != s.q[ch]) begin
            failures++;
            $display("ch %0d: gx %0d/%0d gy %0d/%0d mag %0d/%0d q %0d/%0d", ch, gx[ch], s.gx[ch],
                     gy[ch], s.gy[ch], mag[ch], s.mag[ch], q[ch], s.q[ch]);
          end
        end
      end
    end
  end

  task automatic push(kernel_t k);
    @(negedge clk);
    in_valid = 1; kernel = k;
    expq.push_back('{cycle + 3, k});
    @(posedge clk);
    @(negedge clk); in_valid = 0;
    if ($urandom_range(0, 3) == 0) @(negedge clk);
  endtask

  initial begin
    kernel_t k;
    repeat (3) @(posedge clk);
    rst = 0;
    // Extremes: left column full, right empty, and the reverse; top/bottom.
    k = '0; for (int r = 0; r < 3; r++) k[r][0] = '1; push(k);
    k = '0; for (int r = 0; r < 3; r++) k[r][2] = '1; push(k);
    k = '0; for (int c = 0; c < 3; c++) k[0][c] = '1; push(k);
    k = '0; for (int c = 0; c < 3; c++) begin k[2][c] = '1; k[c][0] = '1; end push(k);
    k = '1; push(k);
    for (int i = 0; i < 400; i++) begin
      // back-to-back kernels
      @(negedge clk);
      in_valid = 1; kernel = rand_kernel();
      expq.push_back('{cycle + 3, kernel});
      if ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (expq.size() != 0 || nsat == 0) begin
      failures++; $display("%0d results missing, %0d saturated", expq.size(), nsat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
