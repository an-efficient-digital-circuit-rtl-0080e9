// Test of the row shift register at 8 characters (10 entries of 4 bits).
// A queue in the bench models the register: load must give
// [0,1,...,8,1]; each enabled clock drops the front and appends
// shift_input or, with reset high, reset_input; a clock with en low
// changes nothing. out1/out2/out3 are compared with entries 0, 1 and the
// last of the model after every edge, under random control and data.
// A watchdog ends the run with a failure if it stalls.
module tb_algo_shifter;
  localparam int unsigned N = 8;
  localparam int unsigned W = 4;

  logic         clk = 1'b0;
  logic         load, en, reset;
  logic [W-1:0] shift_input, reset_input, out1, out2, out3;
  int checks = 0, failures = 0;
  int model [$];

  always #5 clk = ~clk;

  algo_shifter #(.N(N), .W(W)) dut (
    .clk(clk), .load(load), .en(en), .reset(reset),
    .shift_input(shift_input), .reset_input(reset_input),
    .out1(out1), .out2(out2), .out3(out3)
  );

  task automatic compare(input string what);
    checks++;
    if (int'(out1) != model[0] || int'(out2) != model[1] || int'(out3) != model[N+1]) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: out %0d %0d %0d expected %0d %0d %0d", what,
                 out1, out2, out3, model[0], model[1], model[N+1]);
    end
  endtask

  initial begin
    load = 1'b0; en = 1'b0; reset = 1'b0; shift_input = '0; reset_input = '0;
    for (int round = 0; round < 4; round++) begin
      @(negedge clk);
      load = 1'b1;
      en = 1'b1;   // load has priority over a shift
      @(negedge clk);
      load = 1'b0;
      model.delete();
      for (int k = 0; k <= N; k++) model.push_back(k);
      model.push_back(1);
      compare("after load");
      // walk the whole register through, so every entry reaches out1
      for (int t = 0; t < 60; t++) begin
        en          = ($urandom % 4) != 0;
        reset       = ($urandom % 5) == 0;
        shift_input = W'($urandom);
        reset_input = W'($urandom);
        @(negedge clk);
        if (en) begin
          void'(model.pop_front());
          model.push_back(reset ? int'(reset_input) : int'(shift_input));
        end
        compare($sformatf("round %0d step %0d", round, t));
      end
    end
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
