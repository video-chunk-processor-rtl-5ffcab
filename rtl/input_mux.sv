// input_mux: selects which video source feeds the line buffers.
//
// Two pixel streams arrive, one from a camera capture front end (source 0)
// and one from an HDMI receiver (source 1). Each stream is a vertical-sync
// flag, a pixel-valid strobe and one pixel. The configuration input sel picks
// one of them; the selected stream is registered once, so the output lags the
// input by one clock. During reset the output valid and vsync are held low.
//
// The published system shows this multiplexer with its two sources and a
// configuration input; the select encoding and the output register are
// choices of this design.
module input_mux
  import vcp_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   sel,          // 0: camera capture, 1: HDMI receiver
  input  logic   src0_vsync,
  input  logic   src0_valid,
  input  pixel_t src0_pix,
  input  logic   src1_vsync,
  input  logic   src1_valid,
  input  pixel_t src1_pix,
  output logic   out_vsync,
  output logic   out_valid,
  output pixel_t out_pix
);

  always_ff @(posedge clk) begin
    if (rst) begin
      out_vsync <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else if (sel) begin
      out_vsync <= src1_vsync;
      out_valid <= src1_valid;
      out_pix   <= src1_pix;
    end else begin
      out_vsync <= src0_vsync;
      out_valid <= src0_valid;
      out_pix   <= src0_pix;
    end
  end

endmodule
