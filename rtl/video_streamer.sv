// video_streamer: turns processed chunks back into a serial pixel stream.
//
// Each in_valid delivers the fifteen processed pixels of one chunk, q[0] being
// the leftmost. The streamer sends them out one per clock, q[0] first, on
// out_valid/out_pix; out_first marks the first pixel of a chunk. A one-chunk
// holding register accepts a chunk that arrives while the previous one is
// still being sent (the last chunk of a row follows its predecessor after 14
// clocks instead of 15); the held chunk starts right after the previous one,
// so the output stream has no gaps. Two chunks may come 14 clocks apart as
// long as on average no more than one arrives per 15 clocks; an assertion
// flags a chunk that would be lost.
//
// Timing: the first pixel of a chunk appears one clock after in_valid when
// the streamer is idle.
//
// The published system names a video streamer between the kernel processors
// and the HDMI transmitter, and serialises chunk results with multiplexers;
// the shift-register serialiser and the holding register are this design's
// own.
module video_streamer
  import vcp_pkg::*;
(
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  chunk_pixels_t in_q,
  output logic          out_valid,
  output logic          out_first,
  output pixel_t        out_pix
);

  chunk_pixels_t sh;        // pixels still to be sent, sh[0] next
  logic [4:0]    cnt;       // pixels left in sh
  chunk_pixels_t hold;
  logic          hold_v;
  logic          first;

  logic [4:0]    cnt_after; // pixels left after this clock's output

  assign cnt_after = (cnt != 0) ? cnt - 1'b1 : 5'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      hold_v <= 1'b0;
      first  <= 1'b0;
      sh     <= '0;
      hold   <= '0;
    end else begin
      first <= 1'b0;
      if (cnt_after == 0 && (hold_v || in_valid)) begin
        cnt   <= 5'(CHUNK_W);
        first <= 1'b1;
        if (hold_v) begin
          sh     <= hold;
          hold   <= in_q;
          hold_v <= in_valid;
        end else begin
          sh     <= in_q;
        end
      end else begin
        cnt <= cnt_after;
        for (int i = 0; i < CHUNK_W - 1; i++) sh[i] <= sh[i+1];
        if (in_valid) begin
          hold   <= in_q;
          hold_v <= 1'b1;
        end
      end
    end
  end

  assign out_valid = cnt != 0;
  assign out_first = first;
  assign out_pix   = sh[0];

  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
    !(in_valid && hold_v && cnt_after != 0))
    else $error("video_streamer: chunk arrived while one was already held");

endmodule
