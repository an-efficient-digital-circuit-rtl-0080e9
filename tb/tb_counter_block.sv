// Test of the sequencing counters at string length 5. After start the
// bench expects, cycle by cycle, index_i to run 1..5, then 0 (row start,
// reset high, reset_input = row + 1), index_j to step by one after each
// row start, busy high throughout, and busy to fall and done to rise
// exactly 5*6-1 clocks after the start edge with the counters at (5,5).
// It also checks the idle state after rst_n, that done holds and a
// restart while busy. A watchdog ends the run with a
// failure if it stalls.
module tb_counter_block;
  localparam int unsigned N = 5;
  localparam int unsigned W = 3;

  logic         clk = 1'b0;
  logic         rst_n, start;
  logic [W-1:0] index_i, index_j, reset_input;
  logic         reset, busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  counter_block #(.N(N), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .index_i(index_i), .index_j(index_j),
    .reset(reset), .reset_input(reset_input), .busy(busy), .done(done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // Called after a falling edge; runs one full sequence.
  task automatic run_sequence();
    int ei, ej;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    ei = 1;
    ej = 1;
    for (int k = 0; k < N * (N + 1) - 1; k++) begin
      check(busy && !done, $sformatf("busy at cycle %0d", k));
      check(int'(index_i) == ei && int'(index_j) == ej,
            $sformatf("cycle %0d: index (%0d,%0d) expected (%0d,%0d)", k, index_i, index_j, ei, ej));
      check(reset == (ei == 0), $sformatf("cycle %0d: reset %0b", k, reset));
      if (ei == 0) check(int'(reset_input) == ej + 1, $sformatf("cycle %0d: reset_input %0d", k, reset_input));
      @(negedge clk);
      if (ei == 0) ej++;
      ei = (ei == N) ? 0 : ei + 1;
    end
    check(done && !busy, "done after n*(n+1)-1 cycles");
    check(int'(index_i) == N && int'(index_j) == N, "counters stop at (n,n)");
    repeat (3) begin
      @(negedge clk);
      check(done && !busy && !reset, "done holds");
    end
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    repeat (2) @(negedge clk);
    check(!busy && !done && !reset, "idle in reset");
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "idle after reset");
    run_sequence();
    // restart in the middle of a sequence
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (8) @(negedge clk);
    run_sequence();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
