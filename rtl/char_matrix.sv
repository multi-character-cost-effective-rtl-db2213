// char_matrix: alignment correction of a matching engine.
//
// The signatures of a set are laid out as a matrix with their u-substrings
// starting in one column U. Column j therefore always refers to the character
// U-j positions before the detected u-substring, whatever its alignment: one
// of Q consecutive character lines of the pipeline, chosen by a 4-to-1
// multiplexer driven by the alignment code. A multiplexer exists only for a
// (column, character) pair that some signature uses, so signatures sharing a
// character in a column share its multiplexer (the USED mask; the other bits
// are constant zero and vanish in synthesis).
// Timing: the window of clock t and the alignment valid at clock t give the
// registered column lines at clock t+1. TAP is the pipeline stage at which the
// u-substring's lane-0 character sits when its alignment arrives.
// The matrix and its shared 4-to-1 multiplexers follow the original
// architecture; writing it as a masked 256-bit multiplexer per column and
// registering the result are this design's choices.
module char_matrix
  import cs_pkg::*;
#(
  parameter int                 NSIG = H_NSIG,
  parameter sig_t [NSIG-1:0]    SIGS = H_SIGS,
  parameter int                 TAP  = 4,
  parameter int                 WIN  = 48
) (
  input  logic        clk,
  input  logic        rst_n,
  input  char_line_t  win [WIN],
  input  logic        in_valid,
  input  align_t      in_align,
  output logic        out_valid,
  output char_line_t  col [geo_ncols()]
);

  `include "cs_geom.svh"

  function automatic char_line_t used(int j);
    char_line_t u = '0;
    for (int k = 0; k < NSIG; k++) begin
      int i = j - geo_ucol() + int'(SIGS[k].uoff);
      if (i >= 0 && i < int'(SIGS[k].len)) u[sig_char(SIGS[k], i)] = 1'b1;
    end
    return u;
  endfunction

  localparam int U    = geo_ucol();
  localparam int NCOL = geo_ncols();

  if (Q*TAP + U - (NCOL-1) < 0 || Q*TAP + Q-1 + U >= WIN) begin : g_bad
    $error("char_matrix: matrix columns outside the window");
  end

  char_line_t col_d [NCOL];

  always_comb begin
    for (int j = 0; j < NCOL; j++) begin
      col_d[j] = '0;
      for (int a = 0; a < Q; a++)
        if (in_align == align_t'(a)) col_d[j] = win[Q*TAP + Q-1-a + U - j] & used(j);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int j = 0; j < NCOL; j++) col[j] <= '0;
    end else begin
      out_valid <= in_valid;
      col       <= col_d;
    end
  end

endmodule
