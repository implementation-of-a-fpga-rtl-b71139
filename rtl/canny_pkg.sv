// canny_pkg: types and constants shared by the Canny edge-detection stream cores.
//
// Every core carries one pixel per beat on an Avalon-ST style stream (data, valid, ready,
// startofpacket, endofpacket), one frame per packet, in raster order. The widths below follow
// from 8-bit greyscale input: a 3x3 Sobel sum of 8-bit pixels reaches +/-1020 (11 bits
// signed, 10 bits as a magnitude) and |Gx|+|Gy| reaches 2040 (11 bits).
package canny_pkg;

  localparam int unsigned PIX_W = 8;              // greyscale pixel
  localparam int unsigned ABS_W = 10;             // |Gx| or |Gy|, at most 4*255 = 1020
  localparam int unsigned MAG_W = ABS_W + 1;      // |Gx|+|Gy|, at most 2040

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [MAG_W-1:0] mag_t;

  // Gradient direction, one of eight 45-degree sectors counted anticlockwise from the
  // positive Gx axis, decided from the signs of Gx, Gy and from |Gx| against |Gy|.
  typedef enum logic [2:0] {
    SEC_0_45    = 3'd0,  // Gx>=0, Gy>=0, |Gx|>=|Gy|
    SEC_45_90   = 3'd1,  // Gx>=0, Gy>=0, |Gx|< |Gy|
    SEC_90_135  = 3'd2,  // Gx< 0, Gy>=0, |Gx|< |Gy|
    SEC_135_180 = 3'd3,  // Gx< 0, Gy>=0, |Gx|>=|Gy|
    SEC_180_225 = 3'd4,  // Gx< 0, Gy< 0, |Gx|>=|Gy|
    SEC_225_270 = 3'd5,  // Gx< 0, Gy< 0, |Gx|< |Gy|
    SEC_270_315 = 3'd6,  // Gx>=0, Gy< 0, |Gx|< |Gy|
    SEC_315_360 = 3'd7   // Gx>=0, Gy< 0, |Gx|>=|Gy|
  } sector_e;

  // Output word of the Sobel core: the magnitude that later stages compare, plus what
  // non-maximum suppression needs to interpolate along the gradient of the centre pixel.
  typedef struct packed {
    mag_t              mag;     // |Gx| + |Gy|
    logic [ABS_W-1:0]  abs_gx;  // |Gx|
    logic [ABS_W-1:0]  abs_gy;  // |Gy|
    sector_e           sector;  // direction sector
  } grad_t;

  localparam int unsigned GRAD_W = $bits(grad_t);

  // Hysteresis class of one suppressed gradient.
  typedef enum logic [1:0] {
    CLS_NONE   = 2'd0,
    CLS_WEAK   = 2'd1,
    CLS_STRONG = 2'd2
  } edge_class_e;

  // Value sent for an edge and a non-edge pixel on the output stream.
  localparam pixel_t EDGE_ON  = 8'd255;
  localparam pixel_t EDGE_OFF = 8'd0;

endpackage
