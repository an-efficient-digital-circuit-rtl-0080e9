// Test of the string multiplexer at 8 characters: random strings are
// loaded and every index 0..15 of the 4-bit select is applied; positions
// 1..8 must return that character, all others 8'h00. A watchdog ends the
// run with a failure if it stalls.
module tb_string_register;
  import edit_distance_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned IW = dist_width(N);

  char_t [N-1:0] str;
  logic [IW-1:0] index;
  char_t         ch;
  int checks = 0, failures = 0;

  string_register #(.N(N)) dut (.str(str), .index(index), .char_out(ch));

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int p = 0; p < N; p++) str[p] = char_t'($urandom);
      for (int i = 0; i < 2**IW; i++) begin
        char_t exp;
        index = IW'(i);
        #1;
        exp = (i >= 1 && i <= N) ? str[i-1] : 8'h00;
        checks++;
        if (ch !== exp) begin
          failures++;
          $display("FAIL index %0d: %h expected %h", i, ch, exp);
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
