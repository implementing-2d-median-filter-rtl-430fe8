// tb_median_full: one full PAL frame (720 x 576 pixels) through the filter
// with its default 11 x 11 window, pixels offered continuously.
//
// Every output is checked against a reference: a histogram of the keys
// (R+G+B) of the last 121 samples gives the median key, and among samples
// with that key the one of the right rank, newest first, gives the expected
// colour. Window contents follow the filter's streaming rule (see
// tb_median_filter_2d). It also checks that the frame takes 11 clocks per
// pixel, i.e. that a 114 MHz clock sustains 25 frames/s.
module tb_median_full;
  import median_pkg::*;

  localparam int unsigned WIDTH  = 720;
  localparam int unsigned HEIGHT = 576;
  localparam int unsigned WV     = 11;
  localparam int unsigned WH     = 11;
  localparam int unsigned N      = WH * WV;
  localparam int unsigned KEYS   = 766;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic in_valid = 1'b0, in_ready;
  rgb_t in_rgb = '0;
  logic in_line_end = 1'b0, in_frame_end = 1'b0;
  logic out_valid, out_line_end, out_frame_end;
  rgb_t out_rgb;
  fv_t  out_fv;

  median_filter_2d dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_rgb, .in_line_end, .in_frame_end,
    .out_valid, .out_rgb, .out_fv, .out_line_end, .out_frame_end
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  rgb_t pixmem [HEIGHT][WIDTH];
  rgb_t ring_rgb [N];
  int   ring_key [N];
  int   ring_wr = 0;
  int   hist [KEYS];

  typedef struct { rgb_t rgb; int key; logic le; logic fe; } exp_t;
  exp_t exp_q[$];

  function automatic void push_sample(rgb_t p);
    int k = int'(p.r) + int'(p.g) + int'(p.b);
    hist[ring_key[ring_wr]]--;
    hist[k]++;
    ring_rgb[ring_wr] = p;
    ring_key[ring_wr] = k;
    ring_wr = (ring_wr + 1) % N;
  endfunction

  function automatic exp_t window_median();
    exp_t e = '{rgb: '0, key: -1, le: 1'b0, fe: 1'b0};
    int below = 0, k = 0, m;
    while (below + hist[k] <= (N - 1) / 2) begin
      below += hist[k];
      k++;
    end
    m = (N - 1) / 2 - below;          // rank among samples with key k
    for (int a = 0; a < N; a++) begin
      int i = (ring_wr - 1 - a + N) % N;
      if (ring_key[i] == k) begin
        if (m == 0) begin
          e.rgb = ring_rgb[i];
          e.key = k;
          break;
        end
        m--;
      end
    end
    return e;
  endfunction

  int outputs = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_rgb !== e.rgb || 32'(out_fv) != e.key || out_line_end !== e.le
          || out_frame_end !== e.fe) begin
        failures++;
        if (failures < 10)
          $display("FAIL out %0d: %h/%0d, expected %h/%0d", outputs, out_rgb, out_fv, e.rgb, e.key);
      end
      outputs++;
    end
  end

  initial begin
    longint t_start;
    for (int i = 0; i < N; i++) begin
      ring_rgb[i] = '0;
      ring_key[i] = 0;
    end
    for (int k = 0; k < KEYS; k++) hist[k] = 0;
    hist[0] = N;
    // Smooth gradient with impulse noise on about 10% of the pixels.
    for (int y = 0; y < HEIGHT; y++)
      for (int x = 0; x < WIDTH; x++)
        if ($urandom % 10 == 0) pixmem[y][x] = rgb_t'($urandom);
        else pixmem[y][x] = '{r: 8'(x / 3), g: 8'(y / 3), b: 8'((x + y) / 6)};
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t_start = cycle;
    for (int y = 0; y < HEIGHT; y++)
      for (int x = 0; x < WIDTH; x++) begin
        exp_t e;
        logic le, fe;
        le = (x == WIDTH - 1);
        fe = le && (y == HEIGHT - 1);
        in_valid     <= 1'b1;
        in_rgb       <= pixmem[y][x];
        in_line_end  <= le;
        in_frame_end <= fe;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        for (int k = WV - 1; k >= 0; k--)
          push_sample((y - k >= 0) ? pixmem[y-k][x] : rgb_t'('0));
        e = window_median();
        e.le = le;
        e.fe = fe;
        exp_q.push_back(e);
      end
    in_valid <= 1'b0;
    while (exp_q.size() != 0) @(posedge clk);
    checks++;
    // WIDTH*HEIGHT pixels at WV clocks each, plus the pipeline latency
    if (cycle - t_start > longint'(WIDTH * HEIGHT * WV + 2 * WV)) begin
      failures++;
      $display("FAIL frame took %0d clocks", cycle - t_start);
    end
    checks++;
    if (outputs != WIDTH * HEIGHT) begin
      failures++;
      $display("FAIL %0d outputs", outputs);
    end
    $display("frame: %0d outputs in %0d clocks", outputs, cycle - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WIDTH * HEIGHT * WV + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
