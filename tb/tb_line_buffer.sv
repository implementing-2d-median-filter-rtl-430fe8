// tb_line_buffer: streams three frames of 7-pixel lines through a line
// buffer for a 3-line window, with random input gaps and random consumer
// stalls. Each delivered column must hold the pixels of the same column in
// the two previous lines (zero above the first line) and the new pixel,
// with that pixel's flags. It also checks one pixel per clock when neither
// side stalls.
module tb_line_buffer;
  import median_pkg::*;

  localparam int unsigned LINE_WIDTH = 7;
  localparam int unsigned W_V        = 3;
  localparam int unsigned ROWS       = 12;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid = 1'b0, in_ready, col_valid, col_ready = 1'b0;
  rgb_t in_rgb = '0;
  ctrl_t in_ctrl = '0, col_ctrl;
  rgb_t [W_V-1:0] col;

  line_buffer #(.LINE_WIDTH(LINE_WIDTH), .W_V(W_V)) dut (.*);

  int checks = 0, failures = 0;
  rgb_t pix [ROWS][LINE_WIDTH];
  int   n_out = 0;
  int   stall_pct = 30;
  int   busy_cycles = 0;       // stalled cycles in the last two lines

  // consumer
  always @(posedge clk) begin
    if (rst_n && col_valid && col_ready) begin
      int r, x;
      r = n_out / LINE_WIDTH;
      x = n_out % LINE_WIDTH;
      for (int k = 0; k < W_V; k++) begin
        rgb_t e;
        e = (r - (int'(W_V) - 1 - k) >= 0) ? pix[r-(int'(W_V)-1-k)][x] : rgb_t'('0);
        checks++;
        if (col[k] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d col %0d slot %0d: %h, expected %h", r, x, k, col[k], e);
        end
      end
      checks++;
      if (col_ctrl.line_end !== (x == LINE_WIDTH - 1) || col_ctrl.frame_end !== (x == LINE_WIDTH - 1 && r % 4 == 3)) begin
        failures++;
        $display("FAIL flags at row %0d col %0d", r, x);
      end
      n_out++;
    end
    col_ready <= ($urandom % 100) >= stall_pct;
  end

  initial begin
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < LINE_WIDTH; x++) pix[r][x] = rgb_t'($urandom);
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int r = 0; r < ROWS; r++) begin
      if (r == ROWS - 3) stall_pct = 0;
      for (int x = 0; x < LINE_WIDTH; x++) begin
        while (r < ROWS - 3 && ($urandom % 3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_rgb   <= pix[r][x];
        in_ctrl  <= '{line_end: x == LINE_WIDTH - 1, frame_end: x == LINE_WIDTH - 1 && r % 4 == 3};
        @(posedge clk);
        while (!in_ready) begin
          if (r >= ROWS - 2) busy_cycles++;
          @(posedge clk);
        end
      end
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != ROWS * LINE_WIDTH) begin
      failures++;
      $display("FAIL %0d columns delivered", n_out);
    end
    // last two lines were sent without stalls: one pixel per clock
    checks++;
    if (busy_cycles != 0) begin
      failures++;
      $display("FAIL rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (cyc == 3000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
