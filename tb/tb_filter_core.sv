// tb_filter_core: drives the core as the front-end does: a colour stream
// and, one clock later, the key stream (key = R+G+B) with col_last on every
// W_V-th sample, with random gaps and stretches of equal keys. Each output
// must be the colour and key of the sample of rank (N-1)/2 among the last
// N samples (equal keys ordered newest first), with the flags of the
// col_last sample, two clocks after that sample's key entered.
module tb_filter_core;
  import median_pkg::*;

  localparam int unsigned W_H = 3;
  localparam int unsigned W_V = 3;
  localparam int unsigned N   = W_H * W_V;

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic rgb_valid = 1'b0, fv_valid = 1'b0, out_valid;
  rgb_t rgb = '0, out_rgb;
  fv_sample_t fv_sample = '0;
  fv_t out_fv;
  ctrl_t out_ctrl;

  filter_core #(.W_H(W_H), .W_V(W_V), .FV_LAT(1)) dut (.*);

  int checks = 0, failures = 0;
  typedef struct { rgb_t rgb; int key; ctrl_t ctrl; longint due; } exp_t;
  exp_t exp_q[$];
  rgb_t h_rgb[$];
  int   h_key[$];              // [0] newest
  longint cycle = 0;
  int n_out = 0;

  function automatic int key_of(rgb_t p);
    return int'(p.r) + int'(p.g) + int'(p.b);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = exp_q.pop_front();
        if (out_rgb !== e.rgb || 32'(out_fv) != e.key || out_ctrl !== e.ctrl || cycle != e.due) begin
          failures++;
          if (failures < 10)
            $display("FAIL out %0d: %h/%0d/%b at %0d, expected %h/%0d/%b at %0d", n_out,
                     out_rgb, out_fv, out_ctrl, cycle, e.rgb, e.key, e.ctrl, e.due);
        end
      end
      n_out++;
    end
  end

  initial begin
    int cnt = 0;
    logic pend = 1'b0;         // a colour sample whose key is due this cycle
    rgb_t pend_rgb = '0;
    for (int i = 0; i < N; i++) begin
      h_rgb.push_back('0);
      h_key.push_back(0);
    end
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 4000; t++) begin
      logic v;
      rgb_t p;
      ctrl_t c;
      v = (t < 2000) ? (($urandom % 3) != 0) : 1'b1;
      p = (t % 1000 < 500) ? rgb_t'($urandom) : rgb_t'($urandom & 32'h010101);
      c = ctrl_t'($urandom);
      rgb_valid <= v;
      rgb       <= p;
      // key stream: last cycle's colour sample
      fv_valid  <= pend;
      if (pend) begin
        logic last;
        last = (cnt % W_V) == W_V - 1;
        fv_sample <= '{fv: FV_W'(key_of(pend_rgb)), col_last: last, ctrl: last ? c : '0};
        h_rgb.push_front(pend_rgb);
        h_key.push_front(key_of(pend_rgb));
        void'(h_rgb.pop_back());
        void'(h_key.pop_back());
        if (last) begin
          exp_t e;
          int target, rank;
          target = (N - 1) / 2;
          e = '{rgb: '0, key: -1, ctrl: '0, due: 0};
          for (int a = 0; a < N; a++) begin
            rank = 0;
            for (int b = 0; b < N; b++)
              if (h_key[b] < h_key[a] || (h_key[b] == h_key[a] && b < a)) rank++;
            if (rank == target) begin
              e.rgb = h_rgb[a];
              e.key = h_key[a];
            end
          end
          e.ctrl = c;
          e.due  = cycle + 3;   // key taken at the next edge, output 2 edges later
          exp_q.push_back(e);
        end
        cnt++;
      end
      pend     = v;
      pend_rgb = p;
      @(posedge clk);
    end
    rgb_valid <= 1'b0;
    fv_valid  <= 1'b0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_out == 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
