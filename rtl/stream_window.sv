// stream_window: K x K neighbourhood generator for a raster-order pixel stream.
//
// The incoming frame (IMG_W x IMG_H pixels, one per accepted beat) is written into K-1 line
// buffers addressed by column, and the newest column of K vertically adjacent pixels is shifted
// into a K x K register window. Once (K/2) rows plus K/2 pixels have been taken in, every further
// beat completes the window of one pixel, which is offered on the win_* side together with its
// row and column. Border pixels see a window with the rows and columns that fall outside the
// frame replaced by the nearest row or column inside it (edge replication).
//
// After the last pixel of a frame the block feeds itself (K/2)*IMG_W + K/2 internal beats,
// without waiting for input, so that the last rows are emitted; in_ready is low while it does.
// A frame therefore comes out as IMG_W x IMG_H windows, one per clock when nothing stalls.
//
// Handshake: in_* is accepted when in_valid && in_ready; the window is held in win_* while
// win_valid && !win_ready. in_ready depends combinationally on win_ready. Line buffers are read
// asynchronously. Reset (synchronous, active high) clears the counters, not the buffers: rows
// and columns outside the frame are never used, so stale contents cannot reach an output.
// Frame size is fixed by parameters; startofpacket/endofpacket of the input are checked by
// assertions against the pixel count rather than used.
module stream_window #(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480,
  parameter int unsigned K     = 3,
  parameter int unsigned DW    = 8
) (
  input  logic                         clock,
  input  logic                         reset,
  // pixel stream in
  input  logic [DW-1:0]                in_data,
  input  logic                         in_valid,
  output logic                         in_ready,
  input  logic                         in_sop,
  input  logic                         in_eop,
  // window out, edge-replicated at the frame border; win[i][j] is row i (0 = top), column j
  output logic [DW-1:0]                win [K][K],
  output logic                         win_valid,
  input  logic                         win_ready,
  output logic [$clog2(IMG_H)-1:0]     win_row,
  output logic [$clog2(IMG_W)-1:0]     win_col
);

  localparam int unsigned R     = K / 2;
  localparam int unsigned LAT   = R * IMG_W + R;          // beats before the first window
  localparam int unsigned NPIX  = IMG_W * IMG_H;
  localparam int unsigned CNT_W = $clog2(NPIX + LAT + 1);
  localparam int unsigned RW    = $clog2(IMG_H);
  localparam int unsigned CW    = $clog2(IMG_W);

  // line buffers: lbuf[l] holds the row l+1 rows older than the incoming one
  logic [DW-1:0] lbuf [K-1][IMG_W];
  logic [DW-1:0] raw  [K][K];      // shift window, unclamped
  logic [DW-1:0] col_in [K];       // newest column, col_in[0] = newest row

  logic [CNT_W-1:0] beat;          // beats taken in this frame, real and flush
  logic [CW-1:0]    wcol;          // line-buffer column of the next beat
  logic             flushing;
  logic             advance, in_fire, emits;
  logic [RW-1:0]    next_row;
  logic [CW-1:0]    next_col;

  assign in_fire  = in_valid && in_ready;
  assign in_ready = !flushing && (!win_valid || win_ready);
  assign advance  = in_fire || (flushing && (!win_valid || win_ready));
  assign emits    = (beat >= CNT_W'(LAT));

  always_comb begin
    col_in[0] = flushing ? raw[K-1][K-1] : in_data;  // flush beats carry don't-care data
    for (int l = 1; l < K; l++) col_in[l] = lbuf[l-1][wcol];
  end

  always_ff @(posedge clock) begin
    if (advance) begin
      for (int l = 0; l < K - 1; l++) lbuf[l][wcol] <= col_in[l];
      for (int i = 0; i < K; i++) begin
        for (int j = 0; j < K - 1; j++) raw[i][j] <= raw[i][j+1];
        raw[i][K-1] <= col_in[K-1-i];
      end
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      beat      <= '0;
      wcol      <= '0;
      flushing  <= 1'b0;
      win_valid <= 1'b0;
      win_row   <= '0;
      win_col   <= '0;
      next_row  <= '0;
      next_col  <= '0;
    end else begin
      if (win_valid && win_ready) win_valid <= 1'b0;
      if (advance) begin
        wcol <= (wcol == CW'(IMG_W - 1)) ? '0 : wcol + 1'b1;
        if (beat == CNT_W'(NPIX + LAT - 1)) begin
          beat     <= '0;
          flushing <= 1'b0;
        end else begin
          beat <= beat + 1'b1;
          if (beat == CNT_W'(NPIX - 1)) flushing <= 1'b1;
        end
        if (emits) begin
          win_valid <= 1'b1;
          win_row   <= next_row;
          win_col   <= next_col;
          if (next_col == CW'(IMG_W - 1)) begin
            next_col <= '0;
            next_row <= (next_row == RW'(IMG_H - 1)) ? '0 : next_row + 1'b1;
          end else begin
            next_col <= next_col + 1'b1;
          end
        end
      end
    end
  end

  // Edge replication: each tap takes the nearest row and column inside the frame.
  int unsigned rsel [K];
  int unsigned csel [K];
  always_comb begin
    for (int i = 0; i < K; i++) begin
      int d;
      d = i - int'(R);
      if (int'(win_row) + d < 0)            d = -int'(win_row);
      if (int'(win_row) + d > int'(IMG_H) - 1) d = int'(IMG_H) - 1 - int'(win_row);
      rsel[i] = unsigned'(d + int'(R));
      d = i - int'(R);
      if (int'(win_col) + d < 0)            d = -int'(win_col);
      if (int'(win_col) + d > int'(IMG_W) - 1) d = int'(IMG_W) - 1 - int'(win_col);
      csel[i] = unsigned'(d + int'(R));
    end
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        win[i][j] = raw[rsel[i]][csel[j]];
  end

  // Stream rules on the input side.
  always_ff @(posedge clock) begin
    if (!reset && in_fire) begin
      assert (in_sop == (beat == '0))
        else $error("stream_window: startofpacket not on the first pixel of a frame");
      assert (in_eop == (beat == CNT_W'(NPIX - 1)))
        else $error("stream_window: endofpacket not on the last pixel of a frame");
    end
  end

endmodule
