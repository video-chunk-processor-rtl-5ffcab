// vcp_top: video chunk processor, from incoming pixels to parallel Sobel results.
//
// A video source (camera capture or HDMI receiver, chosen by in_sel) delivers
// pixels serially at the pixel clock. The line buffers keep the two previous
// rows on chip, so no frame buffer is needed, and hand on one 3-pixel column
// per pixel. The chunk processor gathers 15 columns into a 15x3 chunk and
// repacks it into fifteen overlapping 3x3 kernels, pulsing chunk_valid once
// per chunk. A test multiplexer can replace these kernels by kernels from an
// external test-image kernel reader (test_sel). Fifteen Sobel kernel
// processors then work on the fifteen kernels at once and deliver the fifteen
// edge pixels q[0..14] of the chunk, which the video streamer sends out again
// one pixel per clock.
//
// Timing with one pixel per clock: the chunk of columns 15c..15c+14 of
// centre row r is complete when pixel (15c+15, r+1) arrives (the last chunk
// of a row: when pixel (WIDTH-1, r+1) arrives). If the input
// register samples that pixel on clock edge t, chunk_valid is high after edge
// t+3 (input register, line buffer read, chunk window, kernel register),
// q_valid after edge t+6 and the streamer's first pixel after edge t+7.
// chunk_valid repeats every 15 pixel clocks within a row (14 before the last
// chunk of a row). The first chunk of a frame therefore needs two full rows
// plus 16 pixels of input.
//
// The chain of blocks, the 15x3 chunk, the fifteen parallel kernel processors
// and the 15-clock chunk period follow the published system; the blocks'
// comments say which details are this design's choice.
module vcp_top
  import vcp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  localparam int unsigned XW = $clog2(WIDTH),
  localparam int unsigned YW = $clog2(HEIGHT + 1),
  localparam int unsigned NCHUNK = WIDTH / CHUNK_W,
  localparam int unsigned CW = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic                    clk,         // pixel clock
  input  logic                    rst,         // synchronous, active high
  // configuration
  input  logic                    in_sel,      // 0: camera, 1: HDMI
  input  logic                    test_sel,    // 0: live kernels, 1: test kernels
  // video sources
  input  logic                    cam_vsync,
  input  logic                    cam_valid,
  input  pixel_t                  cam_pix,
  input  logic                    hdmi_vsync,
  input  logic                    hdmi_valid,
  input  pixel_t                  hdmi_pix,
  // test kernel reader
  input  logic                    test_valid,
  input  chunk_kernels_t          test_kernels,
  // chunks of kernels for downstream algorithm blocks
  output logic                    chunk_valid,
  output chunk_kernels_t          kernels,
  output logic [CW-1:0]           chunk_idx,
  output logic [YW-1:0]           chunk_row,
  // parallel Sobel results
  output logic                    q_valid,
  output chunk_pixels_t           q,
  output grad_pix_t [CHUNK_W-1:0] gx,
  output grad_pix_t [CHUNK_W-1:0] gy,
  output mag_pix_t  [CHUNK_W-1:0] mag,
  // serial output stream
  output logic                    out_valid,
  output logic                    out_first,
  output pixel_t                  out_pix
);

  logic    v_vsync, v_valid;
  pixel_t  v_pix;

  input_mux u_input_mux (
    .clk        (clk),
    .rst        (rst),
    .sel        (in_sel),
    .src0_vsync (cam_vsync),
    .src0_valid (cam_valid),
    .src0_pix   (cam_pix),
    .src1_vsync (hdmi_vsync),
    .src1_valid (hdmi_valid),
    .src1_pix   (hdmi_pix),
    .out_vsync  (v_vsync),
    .out_valid  (v_valid),
    .out_pix    (v_pix)
  );

  logic          col_valid, col_last;
  column_t       col;
  logic [XW-1:0] col_x;
  logic [YW-1:0] col_y;

  line_buffers #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_line_buffers (
    .clk       (clk),
    .rst       (rst),
    .vsync     (v_vsync),
    .in_valid  (v_valid),
    .in_pix    (v_pix),
    .col_valid (col_valid),
    .col       (col),
    .col_x     (col_x),
    .col_y     (col_y),
    .col_last  (col_last)
  );

  chunk_processor #(.WIDTH(WIDTH), .HEIGHT(HEIGHT)) u_chunk_processor (
    .clk         (clk),
    .rst         (rst),
    .col_valid   (col_valid),
    .col         (col),
    .col_x       (col_x),
    .col_y       (col_y),
    .col_last    (col_last),
    .chunk_valid (chunk_valid),
    .kernels     (kernels),
    .chunk_idx   (chunk_idx),
    .chunk_row   (chunk_row)
  );

  logic           kp_valid;
  chunk_kernels_t kp_kernels;

  test_mux u_test_mux (
    .sel          (test_sel),
    .live_valid   (chunk_valid),
    .live_kernels (kernels),
    .test_valid   (test_valid),
    .test_kernels (test_kernels),
    .out_valid    (kp_valid),
    .out_kernels  (kp_kernels)
  );

  kernel_processor_array u_kernel_processors (
    .clk      (clk),
    .rst      (rst),
    .in_valid (kp_valid),
    .kernels  (kp_kernels),
    .q_valid  (q_valid),
    .q        (q),
    .gx       (gx),
    .gy       (gy),
    .mag      (mag)
  );

  video_streamer u_video_streamer (
    .clk       (clk),
    .rst       (rst),
    .in_valid  (q_valid),
    .in_q      (q),
    .out_valid (out_valid),
    .out_first (out_first),
    .out_pix   (out_pix)
  );

endmodule
