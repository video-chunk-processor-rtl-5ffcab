// vcp_tb_pkg: reference models shared by the testbenches.
//
// img() is a deterministic test image: every channel of pixel (x, y) is an
// 8-bit mix of x, y and the channel number, with strong changes from pixel to
// pixel so that edges in all directions occur. ref_sobel() computes the Sobel
// gradients, the |gx|+|gy| magnitude and the 8-bit saturated output of a 3x3
// kernel directly from the formulas, with plain integers, independently of
// the pipelined hardware. ref_kernel() cuts the kernel centred on (x, y) out
// of img(), replicating the left and right image edges.
package vcp_tb_pkg;
  import vcp_pkg::*;

  typedef struct {
    int gx [CHANNELS];
    int gy [CHANNELS];
    int mag[CHANNELS];
    int q  [CHANNELS];
  } sobel_ref_t;

  function automatic pixel_t img(int x, int y, int seed = 0);
    pixel_t p;
    for (int ch = 0; ch < CHANNELS; ch++)
      p[ch] = chan_t'((x * 37) ^ (y * 91) ^ (ch * 53) ^ ((x * y + seed) * 7) ^ (seed * 11));
    return p;
  endfunction

  function automatic kernel_t ref_kernel(int x, int y, int width, int seed = 0);
    kernel_t k;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        int xx = x + c - 1;
        if (xx < 0) xx = 0;
        if (xx > width - 1) xx = width - 1;
        k[r][c] = img(xx, y + r - 1, seed);
      end
    return k;
  endfunction

  function automatic sobel_ref_t ref_sobel(kernel_t k);
    sobel_ref_t s;
    for (int ch = 0; ch < CHANNELS; ch++) begin
      int p[3][3];
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) p[r][c] = int'(k[r][c][ch]);
      s.gx[ch]  = (p[0][2] + 2*p[1][2] + p[2][2]) - (p[0][0] + 2*p[1][0] + p[2][0]);
      s.gy[ch]  = (p[2][0] + 2*p[2][1] + p[2][2]) - (p[0][0] + 2*p[0][1] + p[0][2]);
      s.mag[ch] = (s.gx[ch] < 0 ? -s.gx[ch] : s.gx[ch]) + (s.gy[ch] < 0 ? -s.gy[ch] : s.gy[ch]);
      s.q[ch]   = s.mag[ch] > 255 ? 255 : s.mag[ch];
    end
    return s;
  endfunction

  function automatic kernel_t rand_kernel();
    kernel_t k;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        for (int ch = 0; ch < CHANNELS; ch++)
          k[r][c][ch] = chan_t'($urandom);
    return k;
  endfunction

endpackage
