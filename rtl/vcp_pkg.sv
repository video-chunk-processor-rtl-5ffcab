// vcp_pkg: constants and types shared by the video chunk processor.
//
// An image is processed in chunks of CHUNK_W x CHUNK_H = 15 x 3 pixels. Each
// chunk is repacked into CHUNK_W overlapping 3x3 kernels, one centred on every
// pixel of the chunk's middle row. A pixel holds CHANNELS colour channels of
// PIX_W bits each. The 15x3 chunk, the 15 kernels per chunk and the three
// channels follow the published architecture; the 8-bit channel width and the
// 12-bit Sobel result width are read from the widths of the values in its
// simulation waveforms. Types are packed arrays so they can be passed through
// ports and compared as a whole.
package vcp_pkg;

  localparam int unsigned CHUNK_W  = 15;  // kernels (and columns) per chunk
  localparam int unsigned CHUNK_H  = 3;   // rows per chunk
  localparam int unsigned KSIZE    = 3;   // kernel is KSIZE x KSIZE
  localparam int unsigned CHANNELS = 3;   // RGB or YCbCr
  localparam int unsigned PIX_W    = 8;   // bits per channel
  localparam int unsigned GRAD_W   = 12;  // signed Sobel gradient width

  typedef logic [PIX_W-1:0]                 chan_t;
  typedef chan_t [CHANNELS-1:0]             pixel_t;
  // One column of a chunk: [0] top row (y-1), [1] centre row, [2] bottom row (y+1).
  typedef pixel_t [CHUNK_H-1:0]             column_t;
  // A 3x3 kernel: kernel_t[r][c], r = row 0..2 (top..bottom), c = column 0..2
  // (left..right); [1][1] is the centre pixel.
  typedef pixel_t [KSIZE-1:0][KSIZE-1:0]    kernel_t;
  typedef kernel_t [CHUNK_W-1:0]            chunk_kernels_t;
  typedef pixel_t [CHUNK_W-1:0]             chunk_pixels_t;

  typedef logic signed [GRAD_W-1:0]         grad_t;
  typedef grad_t [CHANNELS-1:0]             grad_pix_t;
  typedef logic [GRAD_W-1:0]                mag_t;
  typedef mag_t [CHANNELS-1:0]              mag_pix_t;

endpackage
