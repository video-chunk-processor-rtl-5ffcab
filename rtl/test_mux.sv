// test_mux: chooses the kernel source of the kernel processors.
//
// In normal operation the kernel processors take the kernels built by the
// chunk processor from live video. For testing, a kernel reader can supply
// chunks of kernels read from a stored test image instead. The configuration
// input sel picks the source: 0 selects the live chunk processor, 1 the test
// kernel reader. The multiplexer is combinational, so it adds no latency and
// keeps the chunk valid strobe aligned with its kernels.
//
// The multiplexer between the live chunk path and the test-image path follows
// the published system diagram; the select encoding is this design's choice.
module test_mux
  import vcp_pkg::*;
(
  input  logic           sel,          // 0: chunk processor, 1: test kernel reader
  input  logic           live_valid,
  input  chunk_kernels_t live_kernels,
  input  logic           test_valid,
  input  chunk_kernels_t test_kernels,
  output logic           out_valid,
  output chunk_kernels_t out_kernels
);

  always_comb begin
    if (sel) begin
      out_valid   = test_valid;
      out_kernels = test_kernels;
    end else begin
      out_valid   = live_valid;
      out_kernels = live_kernels;
    end
  end

endmodule
