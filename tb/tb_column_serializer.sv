// tb_column_serializer: offers random 5-pixel columns at random times and
// checks that each comes out as 5 consecutive samples, top first, with
// col_last and the flags on the last one only, and that back-to-back
// columns leave no idle cycle (one sample per clock).
module tb_column_serializer;
  import median_pkg::*;

  localparam int unsigned W_V = 5;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic col_valid = 1'b0, col_ready, out_valid;
  rgb_t [W_V-1:0] col = '0;
  ctrl_t col_ctrl = '0;
  sample_t out_sample;

  column_serializer #(.W_V(W_V)) dut (.*);

  int checks = 0, failures = 0;
  sample_t exp_q[$];
  int n_out = 0, idle_in_burst = 0;
  logic burst = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        sample_t e;
        checks++;
        e = exp_q.pop_front();
        if (out_sample !== e) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: %h, expected %h", n_out, out_sample, e);
        end
        n_out++;
      end else if (burst && exp_q.size() != 0) idle_in_burst++;
    end
  end

  initial begin
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int c = 0; c < 300; c++) begin
      rgb_t [W_V-1:0] cv;
      ctrl_t cc;
      burst = (c >= 200);
      for (int k = 0; k < W_V; k++) cv[k] = rgb_t'($urandom);
      cc = ctrl_t'($urandom);
      while (!burst && ($urandom % 2)) begin
        col_valid <= 1'b0;
        @(posedge clk);
      end
      col_valid <= 1'b1;
      col       <= cv;
      col_ctrl  <= cc;
      @(posedge clk);
      while (!col_ready) @(posedge clk);
      for (int k = 0; k < W_V; k++)
        exp_q.push_back('{rgb: cv[k], col_last: k == W_V - 1, ctrl: (k == W_V - 1) ? cc : '0});
    end
    col_valid <= 1'b0;
    repeat (W_V + 3) @(posedge clk);
    checks++;
    if (n_out != 300 * W_V || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d samples", n_out);
    end
    checks++;
    if (idle_in_burst != 0) begin
      failures++;
      $display("FAIL %0d idle cycles between back-to-back columns", idle_in_burst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
