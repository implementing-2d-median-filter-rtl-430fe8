// median_filter_2d: non-recursive 2D median filter for RGB video.
//
// A W_H x W_V window slides over the image; each output pixel is the input
// pixel of the window whose key Y = R + G + B is the median of the window's
// keys, so the output colour is always one of the input colours. Pixels are
// streamed in raster order; for each pixel the front-end sends the W_V
// pixels of its column (from the line buffer) to a sorting array one per
// clock, which keeps the last W_H*W_V samples sorted. The median cell's age
// addresses an RGB delay line, which gives the output colour.
//
// Window alignment: the output delivered for input pixel (row y, column x)
// is the median of rows y-W_V+1..y and of the W_H columns that entered last,
// i.e. x-W_H+1..x, so it belongs to the image position (y-(W_V-1)/2,
// x-(W_H-1)/2). No border handling is done: near the left edge the window
// takes the last columns of the previous line, and rows above the first line
// of a frame come from the line buffer (the previous frame, zero at start).
// out_line_end / out_frame_end are the flags of the input pixel, delivered
// with its output pixel.
//
// Rate: one sample per clock in the core, so at most one pixel per W_V
// clocks (in_ready gives back-pressure). For 720x576 at 25 frames/s with an
// 11x11 window that needs 10.368 MHz * 11 = 114 MHz.
// Latency from a pixel's acceptance to its output: W_V + 3 clocks when the
// pipeline is idle.
//
// Origin: the block structure, 24-bit RGB input with line/frame end flags,
// Y = R+G+B and the 720-pixel / 11x11 sizing are the published design; the
// handshake, output alignment and border behaviour are choices of this
// implementation.
module median_filter_2d
  import median_pkg::*;
#(
  parameter int unsigned LINE_WIDTH = 720,
  parameter int unsigned W_H        = 11,
  parameter int unsigned W_V        = 11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  rgb_t  in_rgb,
  input  logic  in_line_end,
  input  logic  in_frame_end,
  output logic  out_valid,
  output rgb_t  out_rgb,
  output fv_t   out_fv,
  output logic  out_line_end,
  output logic  out_frame_end
);

  logic       s_valid, fv_valid;
  sample_t    s_sample;
  fv_sample_t fv_sample;
  ctrl_t      out_ctrl;

  input_front_end #(.LINE_WIDTH(LINE_WIDTH), .W_V(W_V)) u_front_end (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_rgb,
    .in_ctrl  ('{line_end: in_line_end, frame_end: in_frame_end}),
    .s_valid, .s_sample, .fv_valid, .fv_sample
  );

  filter_core #(.W_H(W_H), .W_V(W_V), .FV_LAT(1)) u_core (
    .clk, .rst_n,
    .rgb_valid(s_valid),
    .rgb      (s_sample.rgb),
    .fv_valid, .fv_sample,
    .out_valid, .out_rgb, .out_fv, .out_ctrl
  );

  assign out_line_end  = out_ctrl.line_end;
  assign out_frame_end = out_ctrl.frame_end;

endmodule
