// Shared types and constants of the edit distance engine.
//
// Characters are 8 bits wide, as in the string multiplexer of the
// design (an n-character string is an 8n-bit bus). Distance values and
// counters are DIST_W bits wide, computed from the string length n with
// dist_width(): a value in 0..n needs ceil(log2(n+1)) bits. The design
// sketch speaks of log(n) bits, which is one bit short when n is a power
// of two (the distance n itself could not be held), so the extra bit is
// this implementation's choice.
package edit_distance_pkg;

  localparam int unsigned CHAR_W = 8;

  typedef logic [CHAR_W-1:0] char_t;

  // Width of an unsigned value that must hold 0..n.
  function automatic int unsigned dist_width(input int unsigned n);
    return (n < 1) ? 1 : $clog2(n + 1);
  endfunction

endpackage
