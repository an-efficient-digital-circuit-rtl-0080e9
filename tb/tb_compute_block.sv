// Test of the compute block at 4-bit distances: for every combination of
// the three neighbour values out1, out2, out3 in 0..9 (string length 9
// needs 4 bits), once with equal and once with different characters, the
// result is compared with min(out1 + cost, out2 + 1, out3 + 1) worked out
// in the bench. Characters differing in a single bit are included, so a
// change cost that ignores some character bits is caught. Combinational;
// a watchdog ends the run with a failure if it stalls.
module tb_compute_block;
  import edit_distance_pkg::*;
  localparam int unsigned W = 4;
  localparam int unsigned NMAX = 9;

  char_t        c1, c2;
  logic [W-1:0] o1, o2, o3, y;
  int checks = 0, failures = 0;

  compute_block #(.W(W)) dut (
    .s1_char(c1), .s2_char(c2), .out1(o1), .out2(o2), .out3(o3), .shift_input(y)
  );

  function automatic int model(input int d, input int u, input int l, input int cost);
    int m;
    m = d + cost;
    if (u + 1 < m) m = u + 1;
    if (l + 1 < m) m = l + 1;
    return m;
  endfunction

  initial begin
    for (int d = 0; d <= NMAX; d++)
      for (int u = 0; u <= NMAX; u++)
        for (int l = 0; l <= NMAX; l++)
          for (int k = 0; k < 9; k++) begin
            int exp;
            c1 = char_t'($urandom);
            // k = 0: equal characters; k = 1..8: differ in bit k-1 only
            c2 = (k == 0) ? c1 : c1 ^ char_t'(1 << (k - 1));
            o1 = W'(d); o2 = W'(u); o3 = W'(l);
            #1;
            exp = model(d, u, l, (k == 0) ? 0 : 1);
            if (exp > NMAX) continue;   // cannot occur in a real table of length 9
            checks++;
            if (int'(y) != exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL d=%0d u=%0d l=%0d k=%0d: %0d expected %0d", d, u, l, k, y, exp);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
