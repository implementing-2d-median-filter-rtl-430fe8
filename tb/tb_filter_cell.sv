// tb_filter_cell: checks one sorting cell against a model of its role.
//
// Each cycle the neighbours' values, ages and empty flags and the new sample
// are random (the comparison flags are derived from the values, as the
// neighbouring cells would), and the cell's next data, age and empty flag are
// compared with a model written from the shift semantics of the sorted
// array: the hole left by the discarded sample is filled by shifting the
// samples between it and the insertion point of the new sample.
module tb_filter_cell;
  import median_pkg::*;

  localparam int unsigned N  = 5;
  localparam int unsigned DW = 4;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  logic en = 1'b0;
  logic [DW-1:0] new_sample = '0, left_data = '0, right_data = '0;
  logic [AW-1:0] left_age = '0, right_age = '0;
  logic cmpr_left, cmpr_right;
  logic empty_left = 1'b0, empty_right = 1'b0;
  logic left_edge = 1'b0, right_edge = 1'b0;
  logic [DW-1:0] data;
  logic [AW-1:0] age;
  logic empty, cmpr;
  cell_sel_e sel;

  assign cmpr_left  = left_edge  ? 1'b1 : (new_sample > left_data);
  assign cmpr_right = right_edge ? 1'b0 : (new_sample > right_data);

  filter_cell #(.DW(DW), .N(N), .AW(AW), .INIT_AGE(N - 2)) dut (.*);

  int checks = 0, failures = 0;
  int n_sel [4] = '{0, 0, 0, 0};

  initial begin
    logic [DW-1:0] m_data, e_data;
    int m_age, e_age;
    @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    m_data = '0;
    m_age  = N - 2;
    checks++;
    if (data !== '0 || age !== AW'(N - 2) || empty !== 1'b0) begin
      failures++;
      $display("FAIL reset state");
    end
    for (int t = 0; t < 4000; t++) begin
      logic hole_here, hole_left, hole_right;
      // Random neighbourhood, kept sorted: left <= data <= right.
      left_edge  <= ($urandom % 8) == 0;
      right_edge <= ($urandom % 8) == 0;
      left_data  <= DW'($urandom % (int'(m_data) + 1));
      right_data <= DW'(int'(m_data) + $urandom % (16 - int'(m_data)));
      left_age   <= AW'($urandom % (N - 1));
      right_age  <= AW'($urandom % (N - 1));
      new_sample <= DW'($urandom);
      en         <= ($urandom % 8) != 0;
      hole_here  = (m_age == N - 1);
      hole_left  = !hole_here && ($urandom % 2);
      hole_right = !hole_here && !hole_left;
      empty_left  <= hole_left;
      empty_right <= hole_right;
      #1;
      // Model: where the new sample goes and how the hole is filled.
      e_data = m_data;
      e_age  = m_age + 1;
      if (hole_here) begin
        if (!cmpr_left)      begin e_data = left_data;  e_age = left_age + 1;  end
        else if (cmpr_right) begin e_data = right_data; e_age = right_age + 1; end
        else                 begin e_data = new_sample; e_age = 0;             end
      end else if (hole_right && new_sample <= m_data) begin
        // this cell is at or after the insertion point: shift right
        if (left_edge || new_sample > left_data) begin e_data = new_sample; e_age = 0; end
        else begin e_data = left_data; e_age = left_age + 1; end
      end else if (hole_left && new_sample > m_data) begin
        // this cell is before the insertion point: shift left
        if (right_edge || new_sample <= right_data) begin e_data = new_sample; e_age = 0; end
        else begin e_data = right_data; e_age = right_age + 1; end
      end
      n_sel[sel]++;
      @(posedge clk);
      #1;
      if (en) begin
        m_data = e_data;
        m_age  = e_age;
      end
      checks++;
      if (data !== m_data || 32'(age) != m_age || empty !== (m_age == N - 1)) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d data %0d age %0d empty %b, expected %0d %0d %b",
                   t, data, age, empty, m_data, m_age, m_age == N - 1);
      end
      // The test drives ages only below N so the model stays consistent.
      if (m_age >= N) begin
        m_age = N - 2;
        rst_n = 1'b0;
        #1 rst_n = 1'b1;
        m_data = '0;
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_sel[s] == 0) begin
        failures++;
        $display("FAIL operation %0d never chosen", s);
      end
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
