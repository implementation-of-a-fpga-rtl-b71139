// sobel_operator: 3x3 Sobel gradient core on an 8-bit greyscale Avalon-ST stream.
//
// For every pixel the core forms the two Sobel sums Gx and Gy, the magnitude |Gx| + |Gy|
// (used instead of sqrt(Gx^2 + Gy^2), so no multiplier or square root is needed) and a
// direction code that places the gradient in one of eight 45-degree sectors using only the
// signs of Gx and Gy and the comparison |Gx| against |Gy| (no arctangent).
//
// Kernels, as given by the source design and read with the first matrix index along the
// image column (x) and the second along the image row (y, increasing downwards):
//   Gx = [1 2 1; 0 0 0; -1 -2 -1]  ->  Gx = (left column) - (right column), weights 1 2 1
//   Gy = [-1 0 1; -2 0 2; -1 0 1]  ->  Gy = (row below)   - (row above),    weights 1 2 1
// With y counted upwards, as in the sector diagram, (Gx, Gy) is then the negated intensity
// gradient; the sector therefore names the same line through the pixel, which is all
// non-maximum suppression uses. Ties (|Gx| = |Gy|, a zero component) go to the sector listed
// first in canny_pkg::sector_e; that tie rule and the edge-replicated border are this
// implementation's choices.
//
// Output: one canny_pkg::grad_t per pixel (magnitude, |Gx|, |Gy|, sector).
// Timing: one pixel per clock; output pixel 0 is valid two clocks after input pixel IMG_W + 1
// (counted from 0) is accepted; the last row is flushed without further input.
module sobel_operator
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic   clock,
  input  logic   reset,
  input  pixel_t din_data,
  input  logic   din_valid,
  output logic   din_ready,
  input  logic   din_startofpacket,
  input  logic   din_endofpacket,
  output grad_t  dout_data,
  output logic   dout_valid,
  input  logic   dout_ready,
  output logic   dout_startofpacket,
  output logic   dout_endofpacket
);

  localparam int unsigned K  = 3;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW = $clog2(IMG_W);

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

  logic signed [ABS_W:0] gx, gy;
  logic [ABS_W-1:0]      ax, ay;
  grad_t                 grad;

  always_comb begin
    gx = (ABS_W+1)'(win[0][0]) + ((ABS_W+1)'(win[1][0]) << 1) + (ABS_W+1)'(win[2][0])
       - (ABS_W+1)'(win[0][2]) - ((ABS_W+1)'(win[1][2]) << 1) - (ABS_W+1)'(win[2][2]);
    gy = (ABS_W+1)'(win[2][0]) + ((ABS_W+1)'(win[2][1]) << 1) + (ABS_W+1)'(win[2][2])
       - (ABS_W+1)'(win[0][0]) - ((ABS_W+1)'(win[0][1]) << 1) - (ABS_W+1)'(win[0][2]);
    ax = gx[ABS_W] ? ABS_W'(-gx) : ABS_W'(gx);
    ay = gy[ABS_W] ? ABS_W'(-gy) : ABS_W'(gy);
    grad.mag    = MAG_W'(ax) + MAG_W'(ay);
    grad.abs_gx = ax;
    grad.abs_gy = ay;
    unique case ({gx[ABS_W], gy[ABS_W]})
      2'b00: grad.sector = (ax >= ay) ? SEC_0_45    : SEC_45_90;
      2'b10: grad.sector = (ax >= ay) ? SEC_135_180 : SEC_90_135;
      2'b11: grad.sector = (ax >= ay) ? SEC_180_225 : SEC_225_270;
      default: grad.sector = (ax >= ay) ? SEC_315_360 : SEC_270_315;
    endcase
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
      dout_data          <= grad;
      dout_startofpacket <= (win_row == '0) && (win_col == '0);
      dout_endofpacket   <= (win_row == RW'(IMG_H - 1)) && (win_col == CW'(IMG_W - 1));
    end
  end

endmodule
