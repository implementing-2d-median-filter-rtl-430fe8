// filter_cell: one cell of the systolic sorting array.
//
// The cell holds one sample of the filter window (DATA), its age in accepted
// samples, and an "empty" register that is set when the held sample is the
// oldest of the window (age = N-1) and must be discarded next. The cells of
// the array are kept in ascending order from left (index 0) to right.
//
// Each cycle in which a new sample is presented (en = 1) the cell chooses one
// of four operations: load the new sample, load the left neighbour, load the
// right neighbour, or keep its own sample. The choice follows the decision
// procedure of the design: it depends on whether this cell or a cell to its
// left/right is empty, and on the comparison of the new sample with the data
// of this cell and its two neighbours. The comparison made here is
//     cmpr = (new_sample > data)
// which is true for a prefix of the sorted array, so the new sample is placed
// in front of any equal samples (equal keys end up ordered newest first).
//
// Age update, as in the cell block diagram: the multiplexer selects -1 for the
// new sample, the neighbour's age or the own age, and an incrementer follows,
// so a new sample gets age 0 and every other sample ages by one.
//
// Interface: neighbour data/age/cmpr/empty inputs come from cells i-1 (left)
// and i+1 (right); edge cells get cmpr_left = 1 and cmpr_right = 0, which
// stand for -infinity and +infinity. empty_left/empty_right are the OR of the
// empty flags of all cells on that side (see empty_gen).
// Timing: all state is registered; cmpr is combinational from data and the
// new sample. Reset (active-low, asynchronous) loads data 0, age INIT_AGE.
// The reset state is this design's choice: ages 0..N-1 over the array make
// the window start as N samples of value 0.
//
// Origin: the cell structure (comparator, age counter, empty register, four-
// way choice) and its decision procedure are those of the published
// architecture; the comparison polarity, the clock enable and the reset
// state are choices of this implementation.
module filter_cell
  import median_pkg::*;
#(
  parameter int unsigned DW       = FV_W,          // filter value width
  parameter int unsigned N        = 121,           // cells in the array
  parameter int unsigned AW       = $clog2(N),     // age counter width
  parameter int unsigned INIT_AGE = 0              // age after reset
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,            // a new sample is entered this cycle
  input  logic [DW-1:0] new_sample,
  input  logic [DW-1:0] left_data,
  input  logic [AW-1:0] left_age,
  input  logic [DW-1:0] right_data,
  input  logic [AW-1:0] right_age,
  input  logic          cmpr_left,     // new_sample > left_data
  input  logic          cmpr_right,    // new_sample > right_data
  input  logic          empty_left,    // some cell to the left is empty
  input  logic          empty_right,   // some cell to the right is empty
  output logic [DW-1:0] data,
  output logic [AW-1:0] age,
  output logic          empty,
  output logic          cmpr,          // new_sample > data
  output cell_sel_e     sel            // operation chosen this cycle
);

  localparam logic [AW-1:0] OLDEST = AW'(N - 1);

  logic [DW-1:0] data_d;
  logic [AW-1:0] age_mux, age_d;

  assign cmpr = new_sample > data;

  // CNTRL block: the decision procedure.
  always_comb begin
    sel = SEL_KEEP;
    if (empty) begin
      if (cmpr_left && !cmpr_right) sel = SEL_NEW;
      else if (!cmpr_left)          sel = SEL_LEFT;
      else                          sel = SEL_RIGHT;
    end else if (empty_right) begin
      if (!cmpr) sel = cmpr_left ? SEL_NEW : SEL_LEFT;
    end else if (empty_left) begin
      if (cmpr)  sel = !cmpr_right ? SEL_NEW : SEL_RIGHT;
    end
  end

  // Data and age multiplexers, then the age incrementer.
  always_comb begin
    unique case (sel)
      SEL_NEW:   begin data_d = new_sample; age_mux = '1;       end // -1
      SEL_LEFT:  begin data_d = left_data;  age_mux = left_age;  end
      SEL_RIGHT: begin data_d = right_data; age_mux = right_age; end
      default:   begin data_d = data;       age_mux = age;       end
    endcase
    age_d = age_mux + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data  <= '0;
      age   <= AW'(INIT_AGE);
      empty <= (INIT_AGE == N - 1);
    end else if (en) begin
      data  <= data_d;
      age   <= age_d;
      empty <= (age_d == OLDEST);
    end
  end

endmodule
