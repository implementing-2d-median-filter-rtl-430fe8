// tb_cell_array: sorting array of 9 cells (a 3x3 window) fed with random
// keys, with idle cycles and many equal keys. After every new sample it
// checks that the cells are in ascending order, that the ages are a
// permutation of 0..N-1, that exactly one cell is empty, and that the median
// cell holds the key of rank (N-1)/2 among the last N samples (equal keys
// ordered newest first) and reports that sample's age.
module tb_cell_array;
  import median_pkg::*;

  localparam int unsigned N  = 9;
  localparam int unsigned DW = 10;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic en = 1'b0;
  logic [DW-1:0] new_sample = '0;
  logic [AW-1:0] med_age;
  logic [DW-1:0] med_data;
  logic [N-1:0][DW-1:0] cell_data;
  logic [N-1:0][AW-1:0] cell_age;
  logic [N-1:0] cell_empty;
  cell_sel_e [N-1:0] cell_sel;

  cell_array #(.N(N), .DW(DW), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  int hist[$];                 // hist[0] newest

  task automatic check_state();
    int rank_target = (N - 1) / 2;
    int exp_age = -1;
    logic [N-1:0] seen;
    seen = '0;
    for (int a = 0; a < N; a++) begin
      int rank = 0;
      for (int b = 0; b < N; b++)
        if (hist[b] < hist[a] || (hist[b] == hist[a] && b < a)) rank++;
      if (rank == rank_target) exp_age = a;
    end
    checks++;
    if (32'(med_age) != exp_age || 32'(med_data) != hist[exp_age]) begin
      failures++;
      if (failures < 10)
        $display("FAIL median age %0d key %0d, expected age %0d key %0d",
                 med_age, med_data, exp_age, hist[exp_age]);
    end
    for (int i = 0; i < N; i++) begin
      seen[cell_age[i]] = 1'b1;
      checks++;
      if ((i > 0 && cell_data[i] < cell_data[i-1]) || 32'(cell_data[i]) != hist[cell_age[i]]
          || cell_empty[i] !== (32'(cell_age[i]) == N - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL cell %0d: key %0d age %0d", i, cell_data[i], cell_age[i]);
      end
    end
    checks++;
    if (seen != '1 || !$onehot(cell_empty)) begin
      failures++;
      $display("FAIL ages/empty flags: seen %b empty %b", seen, cell_empty);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) hist.push_back(0);
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1 check_state();
    for (int t = 0; t < 3000; t++) begin
      logic v;
      int k;
      v = ($urandom % 5) != 0;
      k = (t % 500 < 250) ? int'($urandom % 1024) : int'($urandom % 4);
      en         <= v;
      new_sample <= DW'(k);
      @(posedge clk);
      if (v) begin
        hist.push_front(k);
        void'(hist.pop_back());
      end
      #1 check_state();
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
