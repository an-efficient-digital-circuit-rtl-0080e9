// 2-MIN comparator: outputs the smaller of two unsigned W-bit values.
//
// Purely combinational. The compute block uses two of these, one to pick
// the cheaper of the two neighbours that cost an insertion or deletion,
// and one to pick between that and the diagonal (change / match) path.
// Only the function of the comparator is given by the design; the
// single compare-and-select is the simplest circuit that performs it.
module min2_comparator #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb y = (b < a) ? b : a;

endmodule
