// empty_gen: empty-flag propagation for the sorting array.
//
// For every cell i it forms empty_left[i], the OR of the empty flags of all
// cells left of i (indices below i), and empty_right[i], the OR of those of
// all cells right of i. These are purely combinational OR chains, as the
// design prescribes. With exactly one empty cell they tell every cell on
// which side the discarded sample is, i.e. in which direction it must shift.
// Cell 0 has no cell to its left and gets empty_left = 0; cell N-1 gets
// empty_right = 0.
//
// Origin: plain OR chains, as in the published architecture.
module empty_gen #(
  parameter int unsigned N = 121
) (
  input  logic [N-1:0] empty,
  output logic [N-1:0] empty_left,
  output logic [N-1:0] empty_right
);

  // Prefix ORs from the left, suffix ORs from the right.
  assign empty_left[0]    = 1'b0;
  assign empty_right[N-1] = 1'b0;
  for (genvar i = 1; i < N; i++) begin : g_chain
    assign empty_left[i]      = empty_left[i-1] | empty[i-1];
    assign empty_right[N-1-i] = empty_right[N-i] | empty[N-i];
  end

endmodule
