// Exhaustive test of the 2-MIN comparator at 4 bits: every pair of inputs
// is applied and the output is compared with the smaller value worked out
// in the bench. A watchdog ends the run with a failure if it stalls.
module tb_min2_comparator;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  min2_comparator #(.W(W)) dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 2**W; i++) begin
      for (int j = 0; j < 2**W; j++) begin
        a = W'(i);
        b = W'(j);
        #1;
        checks++;
        if (int'(y) != ((i < j) ? i : j)) begin
          failures++;
          $display("FAIL min(%0d,%0d) = %0d", i, j, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
