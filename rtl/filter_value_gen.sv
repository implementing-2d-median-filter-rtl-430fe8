// filter_value_gen: computes the sorting key of a pixel.
//
// The key is Y = R + G + B, a luminance-like value that fits in 10 bits.
// One register stage: the key and the sample's flags come out one clock
// after the sample goes in (LATENCY = 1). The colour itself is not passed
// on: it goes to the RGB delay line directly from the front-end, and the
// filter core compensates for this one-cycle lag when it reads the line.
//
// Origin: the key R+G+B and its 10-bit width are the published ones; the
// single register stage is this implementation's choice.
module filter_value_gen
  import median_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  sample_t    in_sample,
  output logic       out_valid,
  output fv_sample_t out_sample
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_sample <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_sample.fv       <= FV_W'(in_sample.rgb.r) + FV_W'(in_sample.rgb.g)
                             + FV_W'(in_sample.rgb.b);
        out_sample.col_last <= in_sample.col_last;
        out_sample.ctrl     <= in_sample.ctrl;
      end
    end
  end

endmodule
