// non_maximum_suppression: thins gradient ridges to one pixel on an Avalon-ST stream.
//
// Input is the Sobel core's stream of canny_pkg::grad_t. For every pixel the core looks at the
// 3x3 neighbourhood of magnitudes and estimates the magnitude at the two points where the line
// through the pixel, in its gradient direction, leaves the pixel cell: each estimate is a linear
// interpolation between the axial neighbour and the diagonal neighbour that bracket the line.
// With D = max(|Gx|,|Gy|) and d = min(|Gx|,|Gy|), for sectors 0-45 / 180-225 degrees:
//     side A: ((D-d)*E + d*NE) / D        side B: ((D-d)*W + d*SW) / D
// and likewise N/NE | S/SW for 45-90, N/NW | S/SE for 90-135 and W/NW | E/SE for 135-180
// (north is the row above). Both sides are compared after multiplying through by D, so no
// division is needed: the pixel keeps its magnitude if  G*D > A  and  G*D >= B,  and is set to
// zero otherwise.
//
// The interpolation between the two bracketing neighbours and the rule "keep only if greater
// than both interpolated values, else zero" follow the source design. Using >= on side B is
// this implementation's choice: with > on both sides, a ridge whose two central pixels are
// equal (the normal result of an edge lying exactly between two pixel columns) would vanish
// completely. The edge-replicated frame border is also this implementation's choice.
//
// Output: the kept magnitude (canny_pkg::mag_t) or 0, one per pixel.
// Timing: one pixel per clock; output pixel 0 is valid two clocks after input pixel IMG_W + 1
// (counted from 0) is accepted; the last row is flushed without further input.
module non_maximum_suppression
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic  clock,
  input  logic  reset,
  input  grad_t din_data,
  input  logic  din_valid,
  output logic  din_ready,
  input  logic  din_startofpacket,
  input  logic  din_endofpacket,
  output mag_t  dout_data,
  output logic  dout_valid,
  input  logic  dout_ready,
  output logic  dout_startofpacket,
  output logic  dout_endofpacket
);

  localparam int unsigned K  = 3;
  localparam int unsigned RW = $clog2(IMG_H);
  localparam int unsigned CW = $clog2(IMG_W);
  localparam int unsigned PW = MAG_W + ABS_W + 1;   // product width

  grad_t         win [K][K];
  logic          win_valid, win_ready;
  logic [RW-1:0] win_row;
  logic [CW-1:0] win_col;

  stream_window #(.IMG_W(IMG_W), .IMG_H(IMG_H), .K(K), .DW(GRAD_W)) u_window (
    .clock, .reset,
    .in_data(din_data), .in_valid(din_valid), .in_ready(din_ready),
    .in_sop(din_startofpacket), .in_eop(din_endofpacket),
    .win, .win_valid, .win_ready, .win_row, .win_col
  );

  grad_t            ctr;
  logic [ABS_W-1:0] dmax, dmin;
  mag_t             a_ax, a_dg, b_ax, b_dg;   // side A/B axial and diagonal neighbours
  logic [PW-1:0]    lhs, rhs_a, rhs_b;
  logic             keep;

  always_comb begin
    ctr  = win[1][1];
    dmax = (ctr.abs_gx >= ctr.abs_gy) ? ctr.abs_gx : ctr.abs_gy;
    dmin = (ctr.abs_gx >= ctr.abs_gy) ? ctr.abs_gy : ctr.abs_gx;
    unique case (ctr.sector)
      SEC_0_45, SEC_180_225: begin
        a_ax = win[1][2].mag; a_dg = win[0][2].mag;   // E, NE
        b_ax = win[1][0].mag; b_dg = win[2][0].mag;   // W, SW
      end
      SEC_45_90, SEC_225_270: begin
        a_ax = win[0][1].mag; a_dg = win[0][2].mag;   // N, NE
        b_ax = win[2][1].mag; b_dg = win[2][0].mag;   // S, SW
      end
      SEC_90_135, SEC_270_315: begin
        a_ax = win[0][1].mag; a_dg = win[0][0].mag;   // N, NW
        b_ax = win[2][1].mag; b_dg = win[2][2].mag;   // S, SE
      end
      default: begin                                  // 135-180, 315-360
        a_ax = win[1][0].mag; a_dg = win[0][0].mag;   // W, NW
        b_ax = win[1][2].mag; b_dg = win[2][2].mag;   // E, SE
      end
    endcase
    lhs   = PW'(ctr.mag) * PW'(dmax);
    rhs_a = PW'(dmax - dmin) * PW'(a_ax) + PW'(dmin) * PW'(a_dg);
    rhs_b = PW'(dmax - dmin) * PW'(b_ax) + PW'(dmin) * PW'(b_dg);
    keep  = (lhs > rhs_a) && (lhs >= rhs_b);
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
      dout_data          <= keep ? ctr.mag : '0;
      dout_startofpacket <= (win_row == '0) && (win_col == '0);
      dout_endofpacket   <= (win_row == RW'(IMG_H - 1)) && (win_col == CW'(IMG_W - 1));
    end
  end

endmodule
