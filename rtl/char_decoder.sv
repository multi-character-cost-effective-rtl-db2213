// char_decoder: binary to one-hot decoder for one input character.
//
// The 8-bit character becomes a 256-bit character line with exactly one bit
// set, so that comparing a character against a constant is a single wire.
// The scanner has one decoder per input lane (Q = 4). A lane that carries no
// valid character decodes to an all-zero line, which matches nothing; the
// per-lane valid is this design's own addition for partly filled words.
// Purely combinational.
module char_decoder
  import cs_pkg::*;
(
  input  char_t      ch,
  input  logic       valid,
  output char_line_t line
);

  always_comb begin
    line = '0;
    if (valid) line[ch] = 1'b1;
  end

endmodule
