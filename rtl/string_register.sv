// StringRegister: n-to-1 character multiplexer.
//
// The string arrives as an 8n-bit bus, character position p (1..n) in
// bits [8p-1 : 8p-8]. The output is the character at position `index`,
// selected combinationally, as in the design's multiplexer figure.
// Positions are 1-based like the table indices they serve; index 0 (the
// cycle in which a new table row is started and no character is used)
// and indices above n give 8'h00. That out-of-range value is this
// implementation's choice. The string is held by the source that drives
// the bus; the multiplexer adds no register.
module string_register
  import edit_distance_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned IDX_W  = dist_width(N)
) (
  input  char_t [N-1:0]    str,     // str[p-1] = character at position p
  input  logic [IDX_W-1:0] index,   // 1..n
  output char_t            char_out // S[index]
);

  always_comb begin
    char_out = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (int'(index) == p) char_out = str[p-1];
    end
  end

endmodule
