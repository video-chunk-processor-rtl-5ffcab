// sobel_kernel_processor: Sobel edge detection on one 3x3 kernel.
//
// For every colour channel the kernel p[r][c] (r, c = 0..2, centre p[1][1])
// is reduced to the horizontal and vertical Sobel gradients
//   gx = (p[0][2] + 2 p[1][2] + p[2][2]) - (p[0][0] + 2 p[1][0] + p[2][0])
//   gy = (p[2][0] + 2 p[2][1] + p[2][2]) - (p[0][0] + 2 p[0][1] + p[0][2])
// and the magnitude |gx| + |gy|. The output pixel q is the magnitude limited
// to the channel's full scale. A pixel value that grows to the right gives a
// positive gx.
//
// Pipeline: stage 1 forms the four weighted column and row sums, stage 2 the
// two gradients, stage 3 the magnitude and q. out_valid, q, gx, gy and mag
// appear exactly three clocks after in_valid and the kernel; a new kernel may
// enter every clock. Reset clears every pipeline register.
//
// Sobel edge detection on 3x3 kernels, its three-clock processing time and the
// signals gx, gy and magnitude follow the published design. The |gx| + |gy|
// magnitude, its saturation to 8 bits for q and the split of the work into
// the three stages are choices of this design.
module sobel_kernel_processor
  import vcp_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  kernel_t   kernel,
  output logic      out_valid,
  output pixel_t    q,
  output grad_pix_t gx,
  output grad_pix_t gy,
  output mag_pix_t  mag
);

  localparam int unsigned SW = PIX_W + 2;  // weighted sum of three pixels
  typedef logic [SW-1:0] sum_t;

  logic [2:0] v;
  sum_t      s_l [CHANNELS], s_r [CHANNELS], s_t [CHANNELS], s_b [CHANNELS];
  grad_pix_t gx_q, gy_q;

  always_ff @(posedge clk) begin
    if (rst) v <= '0;
    else     v <= {v[1:0], in_valid};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int ch = 0; ch < CHANNELS; ch++) begin
        s_l[ch] <= '0; s_r[ch] <= '0; s_t[ch] <= '0; s_b[ch] <= '0;
      end
      gx_q <= '0;
      gy_q <= '0;
    end else begin
      for (int ch = 0; ch < CHANNELS; ch++) begin
        // Stage 1: weighted sums of the outer columns and rows.
        s_l[ch] <= SW'(kernel[0][0][ch]) + (SW'(kernel[1][0][ch]) << 1) + SW'(kernel[2][0][ch]);
        s_r[ch] <= SW'(kernel[0][2][ch]) + (SW'(kernel[1][2][ch]) << 1) + SW'(kernel[2][2][ch]);
        s_t[ch] <= SW'(kernel[0][0][ch]) + (SW'(kernel[0][1][ch]) << 1) + SW'(kernel[0][2][ch]);
        s_b[ch] <= SW'(kernel[2][0][ch]) + (SW'(kernel[2][1][ch]) << 1) + SW'(kernel[2][2][ch]);
        // Stage 2: gradients.
        gx_q[ch] <= grad_t'(s_r[ch]) - grad_t'(s_l[ch]);
        gy_q[ch] <= grad_t'(s_b[ch]) - grad_t'(s_t[ch]);
      end
    end
  end

  // Stage 3: magnitude and saturated output pixel.
  always_ff @(posedge clk) begin
    if (rst) begin
      mag <= '0;
      q   <= '0;
      gx  <= '0;
      gy  <= '0;
    end else begin
      for (int ch = 0; ch < CHANNELS; ch++) begin
        automatic mag_t ax = gx_q[ch][GRAD_W-1] ? mag_t'(-gx_q[ch]) : mag_t'(gx_q[ch]);
        automatic mag_t ay = gy_q[ch][GRAD_W-1] ? mag_t'(-gy_q[ch]) : mag_t'(gy_q[ch]);
        automatic mag_t m  = ax + ay;
        mag[ch] <= m;
        q[ch]   <= (m > mag_t'({PIX_W{1'b1}})) ? {PIX_W{1'b1}} : m[PIX_W-1:0];
        gx[ch]  <= gx_q[ch];
        gy[ch]  <= gy_q[ch];
      end
    end
  end

  assign out_valid = v[2];

endmodule
