// CounterBlock: sequencing of the table fill.
//
// Two counters drive the rest of the engine, as in the design's counter
// figure. C1 (index_i) is a mod(n+1) counter that advances on every clock
// of a computation and runs 1, 2, ..., n, 0, 1, ...; it selects the
// character of S_1. C2 (index_j) is an accumulator that adds the output
// of a 0/1 multiplexer each clock: it adds 1 in the cycle in which C1 is
// 0 and 0 otherwise, so it selects the character of S_2 and names the
// current table row. The cycle with C1 = 0 is the row-start cycle: the
// `reset` output is high and reset_input carries D(r,0) = r for the row r
// that starts, which is index_j + 1.
//
// Each row thus takes n compute cycles and, between rows, one row-start
// cycle: an n x n table takes n*(n+1) - 1 cycles after `start`.
//
// Start and completion are this implementation's additions: a `start`
// pulse loads C1 = C2 = 1 and raises `busy` (the same pulse loads the
// shifter's initial row); `busy` falls and `done` rises at the edge that computes
// the last cell D(n,n), and `done` stays high until the next `start`.
// rst_n is a synchronous active-low reset of the control state.
module counter_block
  import edit_distance_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = dist_width(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [W-1:0] index_i,      // C1, position in S_1 (0 = row start)
  output logic [W-1:0] index_j,      // C2, position in S_2 (table row)
  output logic         reset,        // row-start cycle
  output logic [W-1:0] reset_input,  // D(index_j+1, 0)
  output logic         busy,         // a computation is running
  output logic         done          // D(n,n) is in the shifter's S[n+1]
);

  logic         last_cell;
  logic [W-1:0] c2_step;

  always_comb begin
    reset       = busy && (index_i == '0);
    reset_input = index_j + W'(1);
    last_cell   = busy && (index_i == W'(N)) && (index_j == W'(N));
    c2_step     = reset ? W'(1) : W'(0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      index_i <= '0;
      index_j <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      index_i <= W'(1);
      index_j <= W'(1);
      busy    <= 1'b1;
      done    <= 1'b0;
    end else if (busy) begin
      if (last_cell) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else begin
        index_i <= (index_i == W'(N)) ? '0 : index_i + W'(1);
        index_j <= index_j + c2_step;
      end
    end
  end

  // A running computation never leaves the table.
  a_index_range : assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> (index_i <= W'(N)) && (index_j >= W'(1)) && (index_j <= W'(N)));
  a_busy_done : assert property (@(posedge clk) disable iff (!rst_n)
    !(busy && done));

endmodule
