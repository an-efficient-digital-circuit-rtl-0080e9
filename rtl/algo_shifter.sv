// AlgoShifter: the n+2 entry shift register that holds the working row.
//
// The register S has entries S[0] .. S[n+1], each W bits wide. On every
// rising clock edge in which `en` is high it shifts left by one entry
// (S[k] <= S[k+1]; S[0] is dropped) and writes a new value into S[n+1].
// A multiplexer controlled by `reset` chooses that value: shift_input,
// the table cell the compute block has just produced, or reset_input,
// the first entry D(r,0) = r of the row that starts next.
// With the register laid out as [D(r-1,0..n), D(r,0)], the three outputs
// out1 = S[0], out2 = S[1] and out3 = S[n+1] are exactly the diagonal,
// upper and left neighbours of the next cell to compute; after n shifts
// S holds [D(r-1,n), D(r,0..n)] and one shift with `reset` set starts
// row r+1. Only n+2 entries are ever stored for an n x n table.
//
// This much follows the design. Two controls are this implementation's
// additions: `load` (synchronous, takes priority) fills S with the
// initial row [0, 1, ..., n, 1], i.e. D(0,0..n) followed by D(1,0), which
// the design assumes to be present; `en` holds the contents once a
// computation has finished. Outputs are taken straight from the register.
module algo_shifter
  import edit_distance_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = dist_width(N)
) (
  input  logic         clk,
  input  logic         load,         // fill S with the initial row
  input  logic         en,           // shift on this edge
  input  logic         reset,        // select reset_input instead of shift_input
  input  logic [W-1:0] shift_input,  // computed D(i,j)
  input  logic [W-1:0] reset_input,  // D(r,0) of the row that starts
  output logic [W-1:0] out1,         // S[0]
  output logic [W-1:0] out2,         // S[1]
  output logic [W-1:0] out3          // S[n+1]
);

  localparam int unsigned ENTRIES = N + 2;

  logic [W-1:0] s [ENTRIES];
  logic [W-1:0] new_entry;

  always_comb new_entry = reset ? reset_input : shift_input;

  always_ff @(posedge clk) begin
    if (load) begin
      for (int unsigned k = 0; k <= N; k++) s[k] <= W'(k);
      s[N+1] <= W'(1);
    end else if (en) begin
      for (int unsigned k = 0; k < ENTRIES - 1; k++) s[k] <= s[k+1];
      s[ENTRIES-1] <= new_entry;
    end
  end

  assign out1 = s[0];
  assign out2 = s[1];
  assign out3 = s[ENTRIES-1];

endmodule
