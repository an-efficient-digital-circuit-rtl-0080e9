// The engine at the two larger block sizes used when long sequences are
// split into t x t tiles: t = 16 and t = 32 characters. Each instance is
// driven and checked cycle by cycle by ed_driver against the software
// table model, including the N*(N+1)-1 cycle latency. A watchdog ends the
// run with a failure if a driver has not finished in time.
module tb_edit_distance_workloads;
  import edit_distance_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int  checks [2];
  int  failures [2];
  bit  finished [2];

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int unsigned N = (g == 0) ? 16 : 32;
    localparam int unsigned W = dist_width(N);

    logic          rst_n, start, busy, done;
    char_t [N-1:0] s1, s2;
    logic [W-1:0]  edit_distance;

    edit_distance_top #(.N(N)) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .s1(s1), .s2(s2),
      .busy(busy), .done(done), .edit_distance(edit_distance)
    );

    ed_driver #(.N(N), .NRANDOM(10), .SEED(11 + g)) drv (
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
      .checks        (checks[g]),
      .failures      (failures[g]),
      .finished      (finished[g])
    );
  end

  initial begin
    wait (finished[0] && finished[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    $display("watchdog: drivers did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end
endmodule
