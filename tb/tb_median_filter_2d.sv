// tb_median_filter_2d: end-to-end test of the 2D median filter.
//
// Streams several small frames through the filter (12-pixel lines, 5x3
// window so that a swap of the window's width and height shows) and checks
// every output pixel against a reference computed here from the image:
// the window of input pixel (row R, column x) holds the W_V-pixel columns of
// the W_H most recent input pixels in stream order; the expected output is
// the sample whose key R+G+B has rank (N-1)/2 when samples are ordered by
// key and, among equal keys, newest first. Before the first N samples the
// window is padded with zero samples, and rows above the first line are
// zero, which is the filter's start-up state.
//
// It also checks the rate (one pixel per W_V clocks under a continuous
// input), the idle latency (output W_V + 3 clocks after acceptance), the line_end/frame_end flags,
// and counts the mechanisms of the design: back-pressure, gaps in the input,
// the four cell operations, the empty cell on either side of the insertion
// point, and both values of the latency compensation of the delay-line
// address. A mechanism that never occurs counts as a failure.
module tb_median_filter_2d;
  import median_pkg::*;

  localparam int unsigned LINE_WIDTH = 12;
  localparam int unsigned W_H        = 5;
  localparam int unsigned W_V        = 3;
  localparam int unsigned N          = W_H * W_V;
  localparam int unsigned LINES      = 6;     // lines per frame
  localparam int unsigned FRAMES     = 4;
  localparam int unsigned ROWS       = LINES * FRAMES;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;     // reset edge before the first clock edge

  logic in_valid = 1'b0, in_ready;
  rgb_t in_rgb = '0;
  logic in_line_end = 1'b0, in_frame_end = 1'b0;
  logic out_valid, out_line_end, out_frame_end;
  rgb_t out_rgb;
  fv_t  out_fv;

  median_filter_2d #(.LINE_WIDTH(LINE_WIDTH), .W_H(W_H), .W_V(W_V)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_rgb, .in_line_end, .in_frame_end,
    .out_valid, .out_rgb, .out_fv, .out_line_end, .out_frame_end
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- model
  rgb_t pixmem [ROWS][LINE_WIDTH];
  rgb_t hist_rgb [N];          // ring of the last N samples
  int   hist_key [N];
  int   hist_wr = 0;           // next slot to write

  typedef struct { rgb_t rgb; int key; logic le; logic fe; } exp_t;
  exp_t exp_q[$];

  function automatic int key_of(rgb_t p);
    return int'(p.r) + int'(p.g) + int'(p.b);
  endfunction

  function automatic void push_sample(rgb_t p);
    hist_rgb[hist_wr] = p;
    hist_key[hist_wr] = key_of(p);
    hist_wr = (hist_wr + 1) % N;
  endfunction

  // Median of the ring: rank by (key, age) with age 0 = newest.
  function automatic exp_t window_median();
    exp_t e = '{rgb: '0, key: -1, le: 1'b0, fe: 1'b0};
    int target = (N - 1) / 2;
    for (int a = 0; a < N; a++) begin
      int ia = (hist_wr - 1 - a + 2 * N) % N;
      int rank = 0;
      for (int b = 0; b < N; b++) begin
        int ib = (hist_wr - 1 - b + 2 * N) % N;
        if (hist_key[ib] < hist_key[ia] || (hist_key[ib] == hist_key[ia] && b < a))
          rank++;
      end
      if (rank == target) begin
        e.rgb = hist_rgb[ia];
        e.key = hist_key[ia];
      end
    end
    return e;
  endfunction

  // Reference step for an accepted pixel at global row r, column x.
  function automatic void model_pixel(int r, int x, logic le, logic fe);
    exp_t e;
    for (int k = W_V - 1; k >= 0; k--)
      push_sample((r - k >= 0) ? pixmem[r-k][x] : rgb_t'('0));
    e = window_median();
    e.le = le;
    e.fe = fe;
    exp_q.push_back(e);
  endfunction

  // ---------------------------------------------------------------- driver
  int   gap_pct = 0;           // chance of an idle cycle before a pixel
  int   stall_cycles = 0, gap_cycles = 0;
  int   rate_checked = 0;
  longint last_accept = -1;
  logic   measure_rate = 1'b0;

  task automatic send_pixel(int r, int x, logic le, logic fe);
    while (gap_pct != 0 && ($urandom % 100) < gap_pct) begin
      in_valid <= 1'b0;
      @(posedge clk);
      gap_cycles++;
    end
    in_valid     <= 1'b1;
    in_rgb       <= pixmem[r][x];
    in_line_end  <= le;
    in_frame_end <= fe;
    @(posedge clk);
    while (!in_ready) begin
      stall_cycles++;
      @(posedge clk);
    end
    // accepted at this edge
    if (measure_rate && last_accept >= 0) begin
      checks++;
      if (cycle - last_accept != W_V) begin
        failures++;
        $display("FAIL rate: %0d cycles between pixels, expected %0d", cycle - last_accept, W_V);
      end
      rate_checked++;
    end
    last_accept = cycle;
    model_pixel(r, x, le, fe);
  endtask

  // ---------------------------------------------------------------- monitor
  int outputs = 0, le_seen = 0, fe_seen = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        e = exp_q.pop_front();
        if (out_rgb !== e.rgb || 32'(out_fv) != e.key || out_line_end !== e.le
            || out_frame_end !== e.fe) begin
          failures++;
          if (failures < 10)
            $display("FAIL out %0d: rgb %h fv %0d le %b fe %b, expected rgb %h key %0d le %b fe %b",
                     outputs, out_rgb, out_fv, out_line_end, out_frame_end,
                     e.rgb, e.key, e.le, e.fe);
        end
      end
      outputs++;
      if (out_line_end)  le_seen++;
      if (out_frame_end) fe_seen++;
    end
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_new = 0, n_left = 0, n_right = 0, n_keep = 0;
  int n_empty_lo = 0, n_empty_hi = 0, n_empty_at = 0;
  int n_comp0 = 0, n_comp1 = 0;
  always @(posedge clk) begin
    if (rst_n && dut.u_core.u_cells.en) begin
      for (int i = 0; i < N; i++) begin
        case (dut.u_core.u_cells.cell_sel[i])
          SEL_NEW:   n_new++;
          SEL_LEFT:  n_left++;
          SEL_RIGHT: n_right++;
          default:   n_keep++;
        endcase
        if (dut.u_core.u_cells.cell_sel[i] == SEL_NEW) begin
          if (dut.u_core.u_cells.cell_empty[i]) n_empty_at++;
          else if (dut.u_core.u_cells.empty_left[i]) n_empty_lo++;
          else n_empty_hi++;
        end
      end
    end
    if (rst_n && dut.u_core.done_q) begin
      if (dut.u_core.in_flight == 0) n_comp0++; else n_comp1++;
    end
  end

  task automatic check_mech(string name, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("mechanism %-34s %0d", name, count);
  endtask

  // ---------------------------------------------------------------- stimulus
  initial begin
    int r;
    longint t0;
    for (int rr = 0; rr < ROWS; rr++)
      for (int x = 0; x < LINE_WIDTH; x++) begin
        int f = rr / LINES;
        // frames 1 and 3 use few distinct values, so keys tie often
        if (f % 2 == 1) pixmem[rr][x] = '{r: 8'($urandom % 3), g: 8'($urandom % 2), b: 8'($urandom % 2)};
        else            pixmem[rr][x] = '{r: 8'($urandom), g: 8'($urandom), b: 8'($urandom)};
      end
    for (int i = 0; i < N; i++) begin
      hist_rgb[i] = '0;
      hist_key[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // Idle latency: a single pixel into an idle filter.
    pixmem[0][0] = '{r: 8'd10, g: 8'd20, b: 8'd30};
    send_pixel(0, 0, 1'b0, 1'b0);
    t0 = cycle;
    in_valid <= 1'b0;
    while (!out_valid) @(posedge clk);
    // out_valid rises W_V + 3 edges after the accepting edge and is sampled
    // high at the edge after that.
    checks++;
    if (cycle - t0 != W_V + 4) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cycle - t0, W_V + 4);
    end
    @(posedge clk);

    // Rest of the frames; continuous input except in frame 2.
    r = 0;
    for (int f = 0; f < FRAMES; f++) begin
      gap_pct      = (f == 2) ? 40 : 0;
      for (int l = 0; l < LINES; l++) begin
        for (int x = (f == 0 && l == 0) ? 1 : 0; x < LINE_WIDTH; x++) begin
          measure_rate = (f != 2) && !(f == 0 && l == 0 && x < 3);
          send_pixel(r, x, x == LINE_WIDTH - 1, (x == LINE_WIDTH - 1) && (l == LINES - 1));
        end
        r++;
      end
      measure_rate = 1'b0;
      last_accept  = -1;
    end
    in_valid <= 1'b0;
    repeat (W_V + 10) @(posedge clk);

    checks++;
    if (exp_q.size() != 0 || outputs != ROWS * LINE_WIDTH) begin
      failures++;
      $display("FAIL %0d outputs, %0d expected, %0d pending", outputs, ROWS * LINE_WIDTH, exp_q.size());
    end
    checks++;
    if (le_seen != ROWS || fe_seen != FRAMES) begin
      failures++;
      $display("FAIL flags: line_end %0d frame_end %0d", le_seen, fe_seen);
    end
    check_mech("back-pressure (in_ready low)", stall_cycles);
    check_mech("input gaps", gap_cycles);
    check_mech("rate measured", rate_checked);
    check_mech("cell loads new sample", n_new);
    check_mech("cell loads left neighbour", n_left);
    check_mech("cell loads right neighbour", n_right);
    check_mech("cell keeps sample", n_keep);
    check_mech("new sample into the empty cell", n_empty_at);
    check_mech("empty cell left of insertion", n_empty_lo);
    check_mech("empty cell right of insertion", n_empty_hi);
    check_mech("delay-line read, nothing in flight", n_comp0);
    check_mech("delay-line read, one sample in flight", n_comp1);
    check_mech("line_end delivered", le_seen);
    check_mech("frame_end delivered", fe_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
