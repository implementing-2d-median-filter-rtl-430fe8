// tb_input_front_end: streams two frames of 6-pixel lines into the front-
// end for a 3-line window, partly with gaps, partly back to back. For every
// pixel it expects the 3 samples of its column (oldest line first, zero
// above the first line) on the colour stream, and on the key stream the same
// samples one clock later with key R+G+B and col_last/flags on the last.
// With a continuous input it must accept one pixel every W_V clocks.
module tb_input_front_end;
  import median_pkg::*;

  localparam int unsigned LINE_WIDTH = 6;
  localparam int unsigned W_V        = 3;
  localparam int unsigned ROWS       = 8;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid = 1'b0, in_ready, s_valid, fv_valid;
  rgb_t in_rgb = '0;
  ctrl_t in_ctrl = '0;
  sample_t s_sample;
  fv_sample_t fv_sample;

  input_front_end #(.LINE_WIDTH(LINE_WIDTH), .W_V(W_V)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t pix [ROWS][LINE_WIDTH];
  sample_t exp_q[$];
  sample_t lag_q[$];
  int n_s = 0;
  longint cycle = 0, last_acc = -1;
  int rate_bad = 0, rate_checked = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && s_valid) begin
      sample_t e;
      e = exp_q.pop_front();
      checks++;
      if (s_sample !== e) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: %h, expected %h", n_s, s_sample, e);
      end
      n_s++;
    end
    // key stream: previous cycle's colour sample
    if (rst_n && fv_valid) begin
      sample_t p;
      checks++;
      if (lag_q.size() == 0) begin
        failures++;
        $display("FAIL key without sample");
      end else begin
        p = lag_q.pop_front();
        if (32'(fv_sample.fv) != int'(p.rgb.r) + int'(p.rgb.g) + int'(p.rgb.b)
            || fv_sample.col_last !== p.col_last || fv_sample.ctrl !== p.ctrl) begin
          failures++;
          if (failures < 10) $display("FAIL key %0d for %h", fv_sample.fv, p.rgb);
        end
      end
    end
    checks++;
    if (lag_q.size() != 0) begin
      failures++;
      $display("FAIL key stream lags by more than one clock");
    end
    if (rst_n && s_valid) lag_q.push_back(s_sample);
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < LINE_WIDTH; x++) pix[r][x] = rgb_t'($urandom);
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < LINE_WIDTH; x++) begin
        ctrl_t c;
        c = '{line_end: x == LINE_WIDTH - 1, frame_end: x == LINE_WIDTH - 1 && r == ROWS / 2 - 1};
        while (r < ROWS / 2 && ($urandom % 2)) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_rgb   <= pix[r][x];
        in_ctrl  <= c;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (r >= ROWS / 2 && last_acc >= 0) begin
          rate_checked++;
          if (cycle - last_acc != W_V) rate_bad++;
        end
        last_acc = cycle;
        for (int k = 0; k < W_V; k++) begin
          int rr;
          rr = r - (int'(W_V) - 1 - k);
          exp_q.push_back('{rgb: (rr >= 0) ? pix[rr][x] : rgb_t'('0),
                            col_last: k == W_V - 1,
                            ctrl: (k == W_V - 1) ? c : '0});
        end
      end
    in_valid <= 1'b0;
    repeat (3 * W_V + 5) @(posedge clk);
    checks++;
    if (n_s != ROWS * LINE_WIDTH * W_V) begin
      failures++;
      $display("FAIL %0d samples", n_s);
    end
    checks++;
    if (rate_bad != 0 || rate_checked == 0) begin
      failures++;
      $display("FAIL rate: %0d of %0d pixel intervals differ from %0d", rate_bad, rate_checked, W_V);
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
