// sig_matcher: signature matching on aligned character columns.
//
// Once the character matrix has corrected the alignment, every signature is
// matched as in a one-character-per-clock design: its characters are read
// from fixed columns (character i of signature k from column U - uoff_k + i).
// Each group of up to six characters is one discrete comparator (one 6-input
// LUT), registered; the comparators of a long signature are ANDed in a
// pipelined tree. Trees are padded to the depth of the longest signature so
// that every signature reports with the same latency. The 6-character
// comparators and pipelined ANDs follow the original architecture; the
// padding is this design's choice (originally the latency depends on the
// signature length).
// Timing: hit follows the columns by LAT = 1 + LVL clocks, where LVL is the
// AND-tree depth for the longest signature's comparator count.
module sig_matcher
  import cs_pkg::*;
#(
  parameter int                 NSIG = H_NSIG,
  parameter sig_t [NSIG-1:0]    SIGS = H_SIGS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  char_line_t      col [geo_ncols()],
  output logic [NSIG-1:0] hit
);

  `include "cs_geom.svh"

  localparam int U    = geo_ucol();
  localparam int NCOL = geo_ncols();
  localparam int NCH  = geo_max_chunks();
  localparam int LVL  = tree_levels(NCH);
  localparam int LAT  = 1 + LVL;

  for (genvar k = 0; k < NSIG; k++) begin : g_sig
    localparam int LEN = int'(SIGS[k].len);
    localparam int BASE = U - int'(SIGS[k].uoff);
    localparam int NC  = cdiv(LEN, LUT_IN);
    logic [NC-1:0] cmp_d, cmp_q;

    // Discrete comparators: up to six character lines ANDed per LUT.
    always_comb begin
      for (int c = 0; c < NC; c++) begin
        cmp_d[c] = in_valid;
        for (int i = c*LUT_IN; i < (c+1)*LUT_IN; i++)
          if (i < LEN) cmp_d[c] = cmp_d[c] & col[BASE + i][sig_char(SIGS[k], i)];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cmp_q <= '0;
      else        cmp_q <= cmp_d;
    end

    reduce_tree #(.N(NC), .IS_AND(1'b1), .LEVELS(LVL)) u_and (
      .clk, .rst_n, .in(cmp_q), .out(hit[k]));
  end

endmodule
