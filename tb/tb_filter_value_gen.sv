// tb_filter_value_gen: checks Y = R + G + B, the one-clock latency and the
// passing of the flags, for random pixels and the extreme values.
module tb_filter_value_gen;
  import median_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic       in_valid = 1'b0, out_valid;
  sample_t    in_sample = '0;
  fv_sample_t out_sample;

  filter_value_gen dut (.*);

  int checks = 0, failures = 0;

  initial begin
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 1000; t++) begin
      sample_t s;
      logic v;
      s = sample_t'({$urandom, $urandom});
      if (t == 0) s.rgb = '{r: 8'hff, g: 8'hff, b: 8'hff};
      if (t == 1) s.rgb = '0;
      v = ($urandom % 4) != 0;
      in_valid  <= v;
      in_sample <= s;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== v ||
          (v && (32'(out_sample.fv) != int'(s.rgb.r) + int'(s.rgb.g) + int'(s.rgb.b)
                 || out_sample.col_last !== s.col_last || out_sample.ctrl !== s.ctrl))) begin
        failures++;
        if (failures < 10)
          $display("FAIL rgb %h: fv %0d valid %b", s.rgb, out_sample.fv, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
