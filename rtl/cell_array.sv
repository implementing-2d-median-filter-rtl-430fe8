// cell_array: the systolic sorting array of the median filter.
//
// N = W_H * W_V filter cells hold the samples of the current window in
// ascending order of their filter value (cell 0 smallest). Every cycle with
// en = 1 one new sample enters and the oldest one (the cell whose empty flag
// is set) leaves; cells between the insertion point and the discarded sample
// shift by one position toward the hole, all in a single clock. Each cell
// owns one comparator, so the array uses N comparators in total.
//
// The result of the array is the age of the median cell (index (N-1)/2):
// the number of samples that entered after the median sample. The filter
// core uses it to address the RGB delay line. The median filter value is
// also given out, as well as the full cell contents for observation.
//
// Timing: a sample presented with en = 1 is sorted in at the next clock
// edge; med_age/med_data are valid from that edge on (registered outputs).
//
// Origin: the published cell array; the observation outputs (cell_*) and
// the one-empty-cell assertion are additions of this implementation.
module cell_array
  import median_pkg::*;
#(
  parameter int unsigned N  = 121,
  parameter int unsigned DW = FV_W,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [DW-1:0]         new_sample,
  output logic [AW-1:0]         med_age,
  output logic [DW-1:0]         med_data,
  output logic [N-1:0][DW-1:0]  cell_data,
  output logic [N-1:0][AW-1:0]  cell_age,
  output logic [N-1:0]          cell_empty,
  output cell_sel_e [N-1:0]     cell_sel
);

  localparam int unsigned MED = (N - 1) / 2;

  logic [N-1:0] cmpr, empty_left, empty_right;

  empty_gen #(.N(N)) u_empty_gen (
    .empty      (cell_empty),
    .empty_left (empty_left),
    .empty_right(empty_right)
  );

  for (genvar i = 0; i < N; i++) begin : g_cell
    // Neighbour connections; edge cells see -inf on the left, +inf on the
    // right (their left/right data inputs are never selected).
    logic [DW-1:0] l_data, r_data;
    logic [AW-1:0] l_age,  r_age;
    logic          l_cmpr, r_cmpr;
    if (i == 0) begin : g_l_edge
      assign l_data = '0;
      assign l_age  = '0;
      assign l_cmpr = 1'b1;
    end else begin : g_l
      assign l_data = cell_data[i-1];
      assign l_age  = cell_age[i-1];
      assign l_cmpr = cmpr[i-1];
    end
    if (i == N - 1) begin : g_r_edge
      assign r_data = '0;
      assign r_age  = '0;
      assign r_cmpr = 1'b0;
    end else begin : g_r
      assign r_data = cell_data[i+1];
      assign r_age  = cell_age[i+1];
      assign r_cmpr = cmpr[i+1];
    end

    filter_cell #(.DW(DW), .N(N), .AW(AW), .INIT_AGE(i)) u_cell (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (en),
      .new_sample (new_sample),
      .left_data  (l_data),
      .left_age   (l_age),
      .right_data (r_data),
      .right_age  (r_age),
      .cmpr_left  (l_cmpr),
      .cmpr_right (r_cmpr),
      .empty_left (empty_left[i]),
      .empty_right(empty_right[i]),
      .data       (cell_data[i]),
      .age        (cell_age[i]),
      .empty      (cell_empty[i]),
      .cmpr       (cmpr[i]),
      .sel        (cell_sel[i])
    );
  end

  assign med_age  = cell_age[MED];
  assign med_data = cell_data[MED];

  // Exactly one cell holds the oldest sample at any time.
  a_one_empty: assert property (@(posedge clk) disable iff (!rst_n) $onehot(cell_empty))
    else $error("cell_array: empty flags not one-hot: %b", cell_empty);

endmodule
