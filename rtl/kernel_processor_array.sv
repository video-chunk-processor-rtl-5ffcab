// kernel_processor_array: fifteen kernel processors working side by side.
//
// All fifteen 3x3 kernels of a chunk enter together with one valid strobe and
// are processed in parallel by fifteen identical Sobel kernel processors, so
// the fifteen output pixels q[0..14] (one per kernel, kernel k centred on
// chunk column k) are also ready together, three clocks after in_valid. The
// gradients and magnitudes of every kernel are brought out next to q.
//
// The fifteen parallel processors, one per kernel of the chunk, and the
// output field q(0)..q(14) follow the published architecture.
module kernel_processor_array
  import vcp_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  chunk_kernels_t           kernels,
  output logic                     q_valid,
  output chunk_pixels_t            q,
  output grad_pix_t [CHUNK_W-1:0]  gx,
  output grad_pix_t [CHUNK_W-1:0]  gy,
  output mag_pix_t  [CHUNK_W-1:0]  mag
);

  logic [CHUNK_W-1:0] valid_k;

  for (genvar k = 0; k < CHUNK_W; k++) begin : g_kp
    sobel_kernel_processor u_kp (
      .clk       (clk),
      .rst       (rst),
      .in_valid  (in_valid),
      .kernel    (kernels[k]),
      .out_valid (valid_k[k]),
      .q         (q[k]),
      .gx        (gx[k]),
      .gy        (gy[k]),
      .mag       (mag[k])
    );
  end

  // All processors run in lock step, so their valids agree.
  assign q_valid = &valid_k;

endmodule
