// hysteresis: double-threshold edge tracking on an Avalon-ST stream of suppressed magnitudes.
//
// Each magnitude x is classed strong (x > T_HIGH), weak (T_LOW < x <= T_HIGH) or none. A strong
// pixel is an edge. A weak pixel is an edge when one of its eight neighbours is strong, or when
// one of the neighbours already decided in raster order (up-left, up, up-right, left) was made
// an edge, so that a run of weak pixels is pulled in step by step from a strong pixel it
// touches. Everything else is not an edge. Output pixels are EDGE_ON (255) or EDGE_OFF (0).
//
// The two thresholds and the growth of strong edges into weak pixels of the 8-neighbourhood
// follow the source design. That design keeps growing until no weak pixel is left to join; a
// single pass over a stream can only follow chains that run forward in raster order (right,
// down-left, down, down-right), so a weak run that reaches a strong pixel only further on in
// raster order is joined only at its pixels adjacent to that strong pixel. That one-pass limit,
// the threshold values (no values are given, both are parameters), pixel values exactly equal to
// T_HIGH counting as weak, and the 0/255 output coding are this implementation's choices.
//
// The line buffers hold 2-bit classes; one further line of 1-bit decisions feeds the raster-order
// growth. Timing: one pixel per clock; output pixel 0 is valid two clocks after input pixel
// IMG_W + 1 (counted from 0) is accepted; the last row is flushed without further input.
module hysteresis
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter mag_t        T_LOW  = 11'd80,
  parameter mag_t        T_HIGH = 11'd160
) (
  input  logic   clock,
  input  logic   reset,
  input  mag_t   din_data,
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

  localparam int unsigned K  = 3;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW = $clog2(IMG_W);

  edge_class_e   in_class;
  logic [1:0]    win [K][K];     // edge_class_e values
  logic          win_valid, win_ready, take;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;

  always_comb begin
    if (din_data > T_HIGH)     in_class = CLS_STRONG;
    else if (din_data > T_LOW) in_class = CLS_WEAK;
    else                       in_class = CLS_NONE;
  end

  stream_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .DW($bits(edge_class_e))) u_window (
    .clock, .reset,
    .in_data(in_class), .in_valid(din_valid), .in_ready(din_ready),
    .in_sop(din_startofpacket), .in_eop(din_endofpacket),
    .win, .win_valid, .win_ready, .win_row, .win_col
  );

  // Decisions of the previous row (and, behind the current column, of this row).
  logic dec_line [IMG_W];
  logic up_left, left;           // decisions at (r-1, c-1) and (r, c-1)
  logic up, up_right;
  logic strong_nb, decided_nb, is_edge;

  always_comb begin
    up       = (win_row != '0) && dec_line[win_col];
    up_right = (win_row != '0) && (win_col != CW'(IMG_W - 1)) &&
               dec_line[(win_col == CW'(IMG_W - 1)) ? win_col : win_col + 1'b1];
    decided_nb = up || up_right ||
                 ((win_row != '0) && (win_col != '0) && up_left) ||
                 ((win_col != '0) && left);
    strong_nb = 1'b0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        if (!(i == 1 && j == 1) && edge_class_e'(win[i][j]) == CLS_STRONG) strong_nb = 1'b1;
    unique case (edge_class_e'(win[1][1]))
      CLS_STRONG: is_edge = 1'b1;
      CLS_WEAK:   is_edge = strong_nb || decided_nb;
      default:    is_edge = 1'b0;
    endcase
  end

  assign win_ready = !dout_valid || dout_ready;
  assign take      = win_valid && win_ready;

  always_ff @(posedge clock) begin
    if (take) begin
      dec_line[win_col] <= is_edge;
      up_left           <= dec_line[win_col];
      left              <= is_edge;
    end
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      dout_valid         <= 1'b0;
      dout_data          <= EDGE_OFF;
      dout_startofpacket <= 1'b0;
      dout_endofpacket   <= 1'b0;
    end else if (win_ready) begin
      dout_valid         <= win_valid;
      dout_data          <= is_edge ? EDGE_ON : EDGE_OFF;
      dout_startofpacket <= (win_row == '0) && (win_col == '0);
      dout_endofpacket   <= (win_row == RW'(IMG_H - 1)) && (win_col == CW'(IMG_W - 1));
    end
  end

endmodule
