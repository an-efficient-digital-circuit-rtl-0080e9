// End-to-end test of the edit distance engine at its default string
// length (8 characters). The stimulus and the reference model are in
// ed_driver; this bench instantiates the engine with its default
// parameters, hands the driver the internal signals it checks cycle by
// cycle, and reports the total. A watchdog ends the run with a failure if
// the driver has not finished in time.
module tb_edit_distance_top;
  import edit_distance_pkg::*;

  localparam int unsigned N = 8;
  localparam int unsigned W = dist_width(N);

  logic          clk = 1'b0;
  logic          rst_n, start, busy, done;
  char_t [N-1:0] s1, s2;
  logic [W-1:0]  edit_distance;
  int            checks, failures;
  bit            finished;

  always #5 clk = ~clk;

  edit_distance_top dut (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .s1            (s1),
    .s2            (s2),
    .busy          (busy),
    .done          (done),
    .edit_distance (edit_distance)
  );

  ed_driver #(.N(N), .NRANDOM(40), .SEED(7)) drv (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .s1            (s1),
    .s2            (s2),
    .busy          (busy),
    .done          (done),
    .edit_distance (edit_distance),
    .row_reset     (dut.row_reset),
    .reset_input   (dut.reset_input),
    .index_i       (dut.index_i),
    .index_j       (dut.index_j),
    .out1          (dut.out1),
    .shift_input   (dut.shift_input),
    .change_cost   (dut.u_compute.change_cost),
    .checks        (checks),
    .failures      (failures),
    .finished      (finished)
  );

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: driver did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
