// Stimulus and checker for the edit distance engine, for any string
// length N.
//
// Drives reset, start and the two strings, and checks against a software
// model of the unit-cost dynamic-programming table:
//   * every cell the engine produces (the compute block's result in each
//     compute cycle, at position index_i along S_1 and index_j along S_2),
//   * the row-start value D(r,0) = r shifted in during row-start cycles,
//   * the final distance and that `done` rises N*(N+1)-1 clocks after the
//     start edge, and that the result and `done` then hold.
// Test strings: identical, completely different, a worked example with
// distance 2 (N = 8 only), random strings over a 4-letter DNA alphabet and
// over a 2-letter alphabet, a restart while busy and a reset while busy.
// It counts how often each mechanism of the engine happened (row starts,
// matching and differing characters, diagonal and insert/delete paths
// winning, completions, restarts) and counts a failure for any that never
// did. Signals inside the engine are passed in by the instantiating bench.
module ed_driver
  import edit_distance_pkg::*;
#(
  parameter int unsigned N       = 8,
  parameter int unsigned NRANDOM = 20,
  parameter int unsigned SEED    = 1
) (
  input  logic                        clk,
  output logic                        rst_n,
  output logic                        start,
  output char_t [N-1:0]               s1,
  output char_t [N-1:0]               s2,
  input  logic                        busy,
  input  logic                        done,
  input  logic [dist_width(N)-1:0]    edit_distance,
  // probes inside the engine
  input  logic                        row_reset,
  input  logic [dist_width(N)-1:0]    reset_input,
  input  logic [dist_width(N)-1:0]    index_i,
  input  logic [dist_width(N)-1:0]    index_j,
  input  logic [dist_width(N)-1:0]    out1,
  input  logic [dist_width(N)-1:0]    shift_input,
  input  logic                        change_cost,
  output int                          checks,
  output int                          failures,
  output bit                          finished
);

  localparam int unsigned W       = dist_width(N);
  localparam int unsigned LATENCY = N * (N + 1) - 1;

  int table_d [N+1][N+1];
  int n_row_starts, n_matches, n_mismatches, n_diag_wins, n_side_wins;
  int n_completions, n_restarts, n_resets;
  int unsigned rng;

  function automatic int unsigned next_rand();
    rng = rng * 1103515245 + 12345;
    return rng >> 8;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL N=%0d: %s", N, what);
    end
  endtask

  function automatic int min3(input int a, input int b, input int c);
    int m;
    m = (a < b) ? a : b;
    return (m < c) ? m : c;
  endfunction

  // D(i,j): distance from the first i characters of S_1 to the first j of S_2.
  task automatic build_table(input char_t [N-1:0] a, input char_t [N-1:0] b);
    for (int k = 0; k <= N; k++) begin
      table_d[k][0] = k;
      table_d[0][k] = k;
    end
    for (int i = 1; i <= N; i++)
      for (int j = 1; j <= N; j++)
        table_d[i][j] = min3(table_d[i-1][j-1] + ((a[i-1] != b[j-1]) ? 1 : 0),
                             table_d[i][j-1] + 1, table_d[i-1][j] + 1);
  endtask

  // Pulse start with the given strings and run to completion, checking
  // every cycle. Called just after a falling edge.
  task automatic run_one(input char_t [N-1:0] a, input char_t [N-1:0] b,
                         input string name);
    int k;
    build_table(a, b);
    s1 = a;
    s2 = b;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    k = 0;
    check(busy && !done, {name, ": busy after start"});
    while (!done && k <= LATENCY + 2) begin
      if (row_reset) begin
        n_row_starts++;
        check(int'(reset_input) == int'(index_j) + 1,
              $sformatf("%s: row start value %0d at row %0d", name, reset_input, index_j));
      end else begin
        int i, j, exp;
        i = int'(index_i);
        j = int'(index_j);
        exp = table_d[i][j];
        check(int'(shift_input) == exp,
              $sformatf("%s: cell D(%0d,%0d) = %0d, expected %0d", name, i, j, shift_input, exp));
        if (change_cost) n_mismatches++; else n_matches++;
        if (int'(shift_input) == int'(out1) + (change_cost ? 1 : 0)) n_diag_wins++;
        else n_side_wins++;
      end
      @(negedge clk);
      k++;
    end
    check(k == LATENCY, $sformatf("%s: done after %0d cycles, expected %0d", name, k, LATENCY));
    check(int'(edit_distance) == table_d[N][N],
          $sformatf("%s: distance %0d, expected %0d", name, edit_distance, table_d[N][N]));
    if (done) n_completions++;
    repeat (3) begin
      @(negedge clk);
      check(done && !busy && int'(edit_distance) == table_d[N][N],
            {name, ": result held after done"});
    end
  endtask

  task automatic random_string(output char_t [N-1:0] s, input int letters);
    byte alphabet [4] = '{"A", "C", "G", "T"};
    for (int p = 0; p < N; p++) s[p] = char_t'(alphabet[next_rand() % letters]);
  endtask

  initial begin
    char_t [N-1:0] a, b;
    checks = 0; failures = 0; finished = 0;
    n_row_starts = 0; n_matches = 0; n_mismatches = 0; n_diag_wins = 0;
    n_side_wins = 0; n_completions = 0; n_restarts = 0; n_resets = 0;
    rng = SEED;
    rst_n = 1'b0;
    start = 1'b0;
    s1 = '0;
    s2 = '0;
    repeat (3) @(negedge clk);
    check(!busy && !done, "idle after reset");
    rst_n = 1'b1;
    @(negedge clk);

    // identical strings: distance 0
    random_string(a, 4);
    run_one(a, a, "identical");
    // no character in common: distance N
    for (int p = 0; p < N; p++) begin
      a[p] = "A";
      b[p] = "G";
    end
    run_one(a, b, "disjoint");
    // worked example: aaaabcda -> aaabcada takes one delete and one insert
    if (N == 8) begin
      automatic string e1 = "aaaabcda";
      automatic string e2 = "aaabcada";
      for (int p = 0; p < 8; p++) begin
        a[p] = char_t'(e1[p]);
        b[p] = char_t'(e2[p]);
      end
      run_one(a, b, "example");
      check(table_d[8][8] == 2, "example distance is 2 in the model");
    end
    // shifted copy: one insertion and one deletion
    random_string(a, 4);
    for (int p = 0; p < N; p++) b[p] = (p == 0) ? char_t'("T") : a[p-1];
    run_one(a, b, "shifted");
    for (int t = 0; t < NRANDOM; t++) begin
      random_string(a, 4);
      random_string(b, 4);
      run_one(a, b, $sformatf("dna%0d", t));
      random_string(a, 2);
      random_string(b, 2);
      run_one(a, b, $sformatf("binary%0d", t));
    end

    // restart while busy: the second start wins
    random_string(a, 4);
    random_string(b, 4);
    s1 = a; s2 = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (N + 3) @(negedge clk);
    n_restarts++;
    random_string(a, 4);
    random_string(b, 4);
    run_one(a, b, "restart");

    // reset while busy: engine returns to idle, then runs normally
    s1 = b; s2 = a; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (N) @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    n_resets++;
    check(!busy && !done, "idle after reset while busy");
    run_one(b, a, "after_reset");

    check(n_row_starts  > 0, "row-start cycles happened");
    check(n_matches     > 0, "matching characters happened");
    check(n_mismatches  > 0, "differing characters happened");
    check(n_diag_wins   > 0, "diagonal path won");
    check(n_side_wins   > 0, "insert/delete path won");
    check(n_completions > 0, "computations completed");
    check(n_restarts    > 0, "restart happened");
    check(n_resets      > 0, "reset while busy happened");
    $display("N=%0d mechanisms: row_starts=%0d matches=%0d mismatches=%0d diag=%0d side=%0d completions=%0d restarts=%0d resets=%0d",
             N, n_row_starts, n_matches, n_mismatches, n_diag_wins, n_side_wins,
             n_completions, n_restarts, n_resets);
    finished = 1;
  end

endmodule
