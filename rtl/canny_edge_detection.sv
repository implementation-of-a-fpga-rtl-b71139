// canny_edge_detection: the Canny edge-detection subsystem, four stream cores in a chain.
//
// A greyscale frame enters on din_* as one Avalon-ST packet (8-bit pixels in raster order,
// startofpacket on the first, endofpacket on the last) and leaves on dout_* as a frame of the
// same size whose pixels are 255 on an edge and 0 elsewhere. Inside, the frame passes through
//   gaussian_filter -> sobel_operator -> non_maximum_suppression -> hysteresis
// each a stream core with clock, reset, din and dout, as in the source design's subsystem. In
// the full system din is fed by a colour-space converter (RGB to grey) after a frame reader, and
// dout goes to an alpha-blending mixer in front of the video output; those are library cores
// and sit outside this module.
//
// Every stage runs at one pixel per clock, so a frame of IMG_W x IMG_H pixels takes
// IMG_W*IMG_H clocks plus the fill latency of the chain: the first pixel out is accepted
// 5*IMG_W + 13 clocks after the first pixel in (2*IMG_W + 4 for the 5x5 stage, IMG_W + 3 for
// each 3x3 stage); 640x480 takes 310 412 clocks, 1.725 ms at 180 MHz. Backpressure on dout_ready
// reaches din_ready combinationally through all four stages. Single clock (the source design
// clocks its processing cores at 180 MHz); reset is synchronous and active high.
module canny_edge_detection
  import canny_pkg::*;
#(
  parameter int unsigned IMG_W  = 640,
  parameter int unsigned IMG_H  = 480,
  parameter int unsigned KERNEL = 0,
  parameter mag_t        T_LOW  = 11'd80,
  parameter mag_t        T_HIGH = 11'd160
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

  pixel_t g_data;  logic g_valid, g_ready, g_sop, g_eop;   // smoothed
  grad_t  s_data;  logic s_valid, s_ready, s_sop, s_eop;   // gradient
  mag_t   n_data;  logic n_valid, n_ready, n_sop, n_eop;   // thinned

  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H), .KERNEL(KERNEL)) gaussian_filter_0 (
    .clock, .reset,
    .din_data, .din_valid, .din_ready, .din_startofpacket, .din_endofpacket,
    .dout_data(g_data), .dout_valid(g_valid), .dout_ready(g_ready),
    .dout_startofpacket(g_sop), .dout_endofpacket(g_eop)
  );

  sobel_operator #(.IMG_W(IMG_W), .IMG_H(IMG_H)) sobel_operator_0 (
    .clock, .reset,
    .din_data(g_data), .din_valid(g_valid), .din_ready(g_ready),
    .din_startofpacket(g_sop), .din_endofpacket(g_eop),
    .dout_data(s_data), .dout_valid(s_valid), .dout_ready(s_ready),
    .dout_startofpacket(s_sop), .dout_endofpacket(s_eop)
  );

  non_maximum_suppression #(.IMG_W(IMG_W), .IMG_H(IMG_H)) non_maximum_suppression_0 (
    .clock, .reset,
    .din_data(s_data), .din_valid(s_valid), .din_ready(s_ready),
    .din_startofpacket(s_sop), .din_endofpacket(s_eop),
    .dout_data(n_data), .dout_valid(n_valid), .dout_ready(n_ready),
    .dout_startofpacket(n_sop), .dout_endofpacket(n_eop)
  );

  hysteresis #(.IMG_W(IMG_W), .IMG_H(IMG_H), .T_LOW(T_LOW), .T_HIGH(T_HIGH)) hysteresis_0 (
    .clock, .reset,
    .din_data(n_data), .din_valid(n_valid), .din_ready(n_ready),
    .din_startofpacket(n_sop), .din_endofpacket(n_eop),
    .dout_data, .dout_valid, .dout_ready, .dout_startofpacket, .dout_endofpacket
  );

endmodule
