// input_front_end: prepares the sample stream for the filter core.
//
// Input pixels (24-bit RGB with line_end/frame_end flags) go into the line
// buffer, which holds W_V-1 lines and returns each pixel's full column. The
// column serializer sends the column's W_V pixels one per clock, and the
// filter value generator turns each into its 10-bit key Y = R + G + B.
//
// Outputs: the colour stream (s_valid, s_sample) taken before the filter
// value generator, which feeds the RGB delay line, and the key stream
// (fv_valid, fv_sample), one clock later, which feeds the sorting cells.
// Rate: one input pixel per W_V clocks at most; in_ready applies back-
// pressure when pixels arrive faster.
//
// Origin: line buffer followed by the key generator is the published
// front-end; the serializer between them is this implementation's.
module input_front_end
  import median_pkg::*;
#(
  parameter int unsigned LINE_WIDTH = 720,
  parameter int unsigned W_V        = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  rgb_t       in_rgb,
  input  ctrl_t      in_ctrl,
  output logic       s_valid,
  output sample_t    s_sample,
  output logic       fv_valid,
  output fv_sample_t fv_sample
);

  logic           col_valid, col_ready;
  rgb_t [W_V-1:0] col;
  ctrl_t          col_ctrl;

  line_buffer #(.LINE_WIDTH(LINE_WIDTH), .W_V(W_V)) u_line_buffer (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_rgb, .in_ctrl,
    .col_valid, .col_ready, .col, .col_ctrl
  );

  column_serializer #(.W_V(W_V)) u_serializer (
    .clk, .rst_n,
    .col_valid, .col_ready, .col, .col_ctrl,
    .out_valid (s_valid),
    .out_sample(s_sample)
  );

  filter_value_gen u_fv_gen (
    .clk, .rst_n,
    .in_valid  (s_valid),
    .in_sample (s_sample),
    .out_valid (fv_valid),
    .out_sample(fv_sample)
  );

endmodule
