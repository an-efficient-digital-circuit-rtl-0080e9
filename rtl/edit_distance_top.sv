// Edit distance engine (unit-cost Needleman-Wunsch / Levenshtein distance).
//
// Computes the minimum number of single-character insertions, deletions
// and changes that turn string S_1 into string S_2, both N characters of
// 8 bits. The dynamic-programming table D (N+1 x N+1) is filled one cell
// per clock, but only N+2 entries of it are ever stored: the AlgoShifter
// holds the previous row and the part of the current row computed so far,
// and its entries S[0], S[1] and S[N+1] are always the diagonal, upper
// and left neighbours of the next cell. The wiring follows the design's
// top-level diagram:
//
//   CounterBlock --index_i--> StringRegister(S_1) --S_1[i]--+
//   CounterBlock --index_j--> StringRegister(S_2) --S_2[j]--+--> ComputeBlock
//   AlgoShifter  --out1/out2/out3---------------------------+        |
//   ComputeBlock --shift_input--> AlgoShifter <--reset, reset_input-- CounterBlock
//   AlgoShifter out3 --> edit_distance
//
// The fast counter (index_i) walks S_1 and the slow one (index_j) walks
// S_2, as the counter figure names them, so the shifter holds the table
// row by row along S_2. With unit costs the table read that way has the
// same final entry D(N,N).
//
// Interface (this implementation's own): pulse `start` for one clock with
// s1/s2 stable; `busy` is high while the table is filled; `done` rises
// N*(N+1)-1 clocks after the start edge (N*N compute cycles and N-1
// row-start cycles) and then edit_distance is valid, held until the next
// start. s1 and s2 must stay stable while busy. rst_n (synchronous,
// active low) clears the control state.
module edit_distance_top
  import edit_distance_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = dist_width(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  char_t [N-1:0] s1,             // s1[p-1] = S_1 position p
  input  char_t [N-1:0] s2,             // s2[p-1] = S_2 position p
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  edit_distance   // D(N,N), valid while done
);

  logic [W-1:0] index_i, index_j;
  logic         row_reset;
  logic [W-1:0] reset_input, shift_input;
  logic [W-1:0] out1, out2, out3;
  char_t        s1_char, s2_char;

  counter_block #(.N(N), .W(W)) u_counter (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .index_i     (index_i),
    .index_j     (index_j),
    .reset       (row_reset),
    .reset_input (reset_input),
    .busy        (busy),
    .done        (done)
  );

  string_register #(.N(N), .IDX_W(W)) u_str1 (
    .str      (s1),
    .index    (index_i),
    .char_out (s1_char)
  );

  string_register #(.N(N), .IDX_W(W)) u_str2 (
    .str      (s2),
    .index    (index_j),
    .char_out (s2_char)
  );

  compute_block #(.W(W)) u_compute (
    .s1_char     (s1_char),
    .s2_char     (s2_char),
    .out1        (out1),
    .out2        (out2),
    .out3        (out3),
    .shift_input (shift_input)
  );

  algo_shifter #(.N(N), .W(W)) u_shifter (
    .clk         (clk),
    .load        (start),
    .en          (busy),
    .reset       (row_reset),
    .shift_input (shift_input),
    .reset_input (reset_input),
    .out1        (out1),
    .out2        (out2),
    .out3        (out3)
  );

  assign edit_distance = out3;

endmodule
