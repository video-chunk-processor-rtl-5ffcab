// chunk_processor: repacks 3-pixel columns into 15x3 chunks of 3x3 kernels.
//
// Columns from the line buffers (three vertically adjacent pixels each) are
// shifted into a 17-column window. Every 15 columns of a row form a chunk, and
// the chunk is turned into fifteen overlapping 3x3 kernels: kernel k is centred
// on chunk column k and also takes the column to its left and to its right.
// Kernel 0 therefore needs the last column of the previous chunk and kernel 14
// the first column of the next chunk, so a chunk is emitted once the first
// column of the following chunk has arrived. At the left and right image edges
// the missing neighbour column is replaced by the edge column itself
// (replicate), and the last chunk of a row is emitted as soon as the row's last
// column has arrived.
//
// Interface: col_* in (one column per clock at most; col_x counts 0..WIDTH-1
// within a row, col_last marks WIDTH-1). Out: chunk_valid pulses for one clock
// with all fifteen kernels in kernels[0..14], the chunk number within the row
// (chunk_idx, 0..WIDTH/15-1) and the centre row (chunk_row).
//
// Timing: chunk_valid follows the column that completes a chunk by two clocks.
// With one column per clock, chunk_valid pulses every 15 clocks, except that
// the last chunk of a row follows the one before it after 14 clocks (it does
// not wait for a right neighbour).
//
// The 15x3 chunk, the fifteen kernels processed together, the pulse per chunk
// and its 15-clock spacing follow the published architecture. Completing the
// boundary kernels from the neighbouring chunks, edge replication and the
// two-clock latency are choices of this design. WIDTH must be a multiple of 15.
module chunk_processor
  import vcp_pkg::*;
#(
  parameter int unsigned WIDTH  = 1920,
  parameter int unsigned HEIGHT = 1080,
  localparam int unsigned XW = $clog2(WIDTH),
  localparam int unsigned YW = $clog2(HEIGHT + 1),
  localparam int unsigned NCHUNK = WIDTH / CHUNK_W,
  localparam int unsigned CW = (NCHUNK > 1) ? $clog2(NCHUNK) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           col_valid,
  input  column_t        col,
  input  logic [XW-1:0]  col_x,
  input  logic [YW-1:0]  col_y,
  input  logic           col_last,
  output logic           chunk_valid,
  output chunk_kernels_t kernels,
  output logic [CW-1:0]  chunk_idx,
  output logic [YW-1:0]  chunk_row
);

  localparam int unsigned WIN = CHUNK_W + 2;  // chunk plus both neighbours

  initial begin
    assert (WIDTH % CHUNK_W == 0 && WIDTH >= CHUNK_W)
      else $error("chunk_processor: WIDTH must be a positive multiple of %0d", CHUNK_W);
  end

  column_t         sr [WIN];        // sr[WIN-1] is the newest column
  logic [3:0]      ph;              // position within the chunk of the next column
  logic [3:0]      ph_cur;          // position within the chunk of this column
  logic [CW-1:0]   cidx;            // chunks of this row emitted so far
  logic            emit_mid;        // a chunk with a right neighbour is complete
  logic            emit_last;       // the last chunk of the row is complete
  logic            first_chunk;     // the pending chunk is the first of its row
  logic [YW-1:0]   row_q;

  assign ph_cur = (col_x == '0) ? 4'd0 : ph;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < WIN; i++) sr[i] <= '0;
    end else if (col_valid) begin
      for (int i = 0; i < WIN - 1; i++) sr[i] <= sr[i+1];
      sr[WIN-1] <= col;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ph          <= '0;
      cidx        <= '0;
      emit_mid    <= 1'b0;
      emit_last   <= 1'b0;
      first_chunk <= 1'b0;
      row_q       <= '0;
    end else begin
      emit_mid  <= 1'b0;
      emit_last <= 1'b0;
      if (col_valid) begin
        ph          <= (ph_cur == 4'(CHUNK_W - 1)) ? 4'd0 : ph_cur + 4'd1;
        row_q       <= col_y;
        emit_mid    <= (ph_cur == 4'd0) && (col_x != '0);
        emit_last   <= col_last;
        first_chunk <= (col_x == XW'(CHUNK_W)) || (col_last && WIDTH == CHUNK_W);
        if (col_x == '0)
          cidx <= '0;
        else if (ph_cur == 4'd0 && cidx != CW'(NCHUNK - 1))
          cidx <= cidx + 1'b1;
      end
    end
  end

  // The 17 columns of the pending chunk: [0] left neighbour, [1..15] the
  // chunk, [16] right neighbour.
  column_t win [WIN];

  always_comb begin
    if (emit_last) begin
      for (int i = 1; i < WIN; i++) win[i] = sr[i+1 < WIN ? i+1 : WIN-1];
      win[0]     = first_chunk ? sr[2] : sr[1];
      win[WIN-1] = sr[WIN-1];
    end else begin
      for (int i = 0; i < WIN; i++) win[i] = sr[i];
      if (first_chunk) win[0] = sr[1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      chunk_valid <= 1'b0;
      kernels     <= '0;
      chunk_idx   <= '0;
      chunk_row   <= '0;
    end else begin
      chunk_valid <= emit_mid || emit_last;
      if (emit_mid || emit_last) begin
        for (int k = 0; k < CHUNK_W; k++)
          for (int r = 0; r < KSIZE; r++)
            for (int c = 0; c < KSIZE; c++)
              kernels[k][r][c] <= win[k+c][r];
        // A mid-row chunk is emitted when the next chunk's first column
        // arrives, at which point cidx already counts it.
        chunk_idx <= emit_last ? cidx : cidx - 1'b1;
        chunk_row <= row_q;
      end
    end
  end

endmodule
