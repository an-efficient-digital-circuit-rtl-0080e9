// ComputeBlock: one cell of the edit distance table per evaluation.
//
//   D(i,j) = min( D(i-1,j-1) + change_cost , min(D(i-1,j), D(i,j-1)) + 1 )
//
// with change_cost = 1 when the two characters differ and 0 when they
// match (unit costs for insert, delete and change). The structure follows
// the design's block diagram: an XOR of the two characters yields the
// change cost, one adder adds it to the diagonal value (out1), a 2-MIN
// comparator picks the smaller of the upper (out2) and left (out3)
// neighbours, a second adder adds the constant 1 to it, and a final 2-MIN
// comparator selects the result, which is fed back as shift_input.
//
// The 8-bit XOR is reduced with an OR to a single change-cost bit; that
// reduction is this implementation's reading of the "XOR gate" of the
// diagram. Combinational; the AlgoShifter registers the result.
// The sums can not overflow in use: every table value is at most n and
// the result is at most n, so they are formed one bit wider and the
// result is truncated back to W bits.
module compute_block
  import edit_distance_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  char_t        s1_char,      // S_1[i]
  input  char_t        s2_char,      // S_2[j]
  input  logic [W-1:0] out1,         // D(i-1,j-1), shifter entry S[0]
  input  logic [W-1:0] out2,         // D(i-1,j),   shifter entry S[1]
  input  logic [W-1:0] out3,         // D(i,j-1),   shifter entry S[n+1]
  output logic [W-1:0] shift_input   // D(i,j)
);

  logic         change_cost;         // 1 when the characters differ

  logic [W:0]   diag_sum;
  logic [W-1:0] side_min;
  logic [W:0]   side_sum;
  logic [W:0]   result;

  always_comb change_cost = |(s1_char ^ s2_char);

  always_comb diag_sum = {1'b0, out1} + {{W{1'b0}}, change_cost};

  min2_comparator #(.W(W)) u_min_side (
    .a (out2),
    .b (out3),
    .y (side_min)
  );

  always_comb side_sum = {1'b0, side_min} + (W+1)'(1);

  min2_comparator #(.W(W+1)) u_min_out (
    .a (diag_sum),
    .b (side_sum),
    .y (result)
  );

  always_comb begin
    shift_input = result[W-1:0];
    // Table values never exceed n, so the extra result bit stays clear.
    a_no_overflow : assert (result[W] == 1'b0);
  end

endmodule
