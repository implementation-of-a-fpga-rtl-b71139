// gaussian_filter: 5x5 Gaussian smoothing core on an 8-bit greyscale Avalon-ST stream.
//
// Each output pixel is the weighted sum of its 5x5 neighbourhood divided by a power of two:
// the kernel weights are integers and the division by their nominal normaliser is replaced by
// a right shift, which is what makes the core multiplier-free (weights are constants, so the
// products reduce to shifts and adds). Two kernels are built in, selected by KERNEL:
//   KERNEL = 0 (default), sigma = 1.4:  2 4 5 4 2 / 4 9 12 9 4 / 5 12 15 12 5 / ... , >> 7
//   KERNEL = 1,           sigma = 1.0:  1 4 7 4 1 / 4 16 26 16 4 / 7 26 41 26 7 / ..., >> 8
// The weights, the sigma = 1.4 kernel as the one in use and the shift by 7 for it (a divisor of
// 115 rounded to 128) follow the source design. The sigma = 1.4 weights add up to 159, not 128,
// so the shift gives a gain of about 1.24; results above 255 saturate. The shift of 8 for the
// second kernel (273 rounded to 256), the saturation and the edge-replicated frame border are
// this implementation's choices.
//
// Interface: din_* in, dout_* out, one pixel per beat, one frame of IMG_W x IMG_H per packet.
// Timing: one pixel per clock; output pixel 0 is valid two clocks after input pixel 2*IMG_W + 2
// (counted from 0) is accepted; the last two rows are flushed without further input.
module gaussian_filter
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned KERNEL = 0
) (
  input  logic   clock,
  input  logic   reset,
  input  pixel_t din_data,
  input  logic   din_valid,
  output logic   din_ready,
  input  logic   din_startofpacket,
  input  logic   din_endofpacket,
  output pixel_t dout_data,
  output logic   dout_valid,
  input  logic   dout_ready,
  output logic   dout_startofpacket,
  output logic   dout_endofpacket
);

  localparam int unsigned K = 5;
  localparam int unsigned SHIFT = (KERNEL == 0) ? 7 : 8;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW = $clog2(IMG_W);

  typedef int unsigned kernel_t [K][K];
  localparam kernel_t W14 = '{'{2, 4, 5, 4, 2}, '{4, 9, 12, 9, 4}, '{5, 12, 15, 12, 5},
                              '{4, 9, 12, 9, 4}, '{2, 4, 5, 4, 2}};
  localparam kernel_t W10 = '{'{1, 4, 7, 4, 1}, '{4, 16, 26, 16, 4}, '{7, 26, 41, 26, 7},
                              '{4, 16, 26, 16, 4}, '{1, 4, 7, 4, 1}};

  pixel_t        win [K][K];
  logic          win_valid, win_ready;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;

  stream_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .DW(PIX_W)) u_window (
    .clock, .reset,
    .in_data(din_data), .in_valid(din_valid), .in_ready(din_ready),
    .in_sop(din_startofpacket), .in_eop(din_endofpacket),
    .win, .win_valid, .win_ready, .win_row, .win_col
  );

  logic [17:0] acc;      // 255 * 273 < 2^17
  logic [17:0] scaled;
  pixel_t      smooth;

  always_comb begin
    acc = '0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        acc += 18'((KERNEL == 0 ? W14[i][j] : W10[i][j]) * win[i][j]);
    scaled = acc >> SHIFT;
    smooth = (scaled > 18'd255) ? 8'd255 : scaled[PIX_W-1:0];
  end

  assign win_ready = !dout_valid || dout_ready;

  always_ff @(posedge clock) begin
    if (reset) begin
      dout_valid         <= 1'b0;
      dout_data          <= '0;
      dout_startofpacket <= 1'b0;
      dout_endofpacket   <= 1'b0;
    end else if (win_ready) begin
      dout_valid         <= win_valid;
      dout_data          <= smooth;
      dout_startofpacket <= (win_row == '0) && (win_col == '0);
      dout_endofpacket   <= (win_row == RW'(IMG_H - 1)) && (win_col == CW'(IMG_W - 1));
    end
  end

endmodule
