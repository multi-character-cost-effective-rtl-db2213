// usub_matcher: u-substring detection for one matching engine.
//
// Every signature of an h-set or t-set owns a u-substring that no other
// signature of the set contains. All u-substrings are matched at one common
// pipeline stage SC: for each alignment a (the lane of the u-substring's
// first character) the character lines at the right ages are ANDed, the
// shift-and-compare technique, and the result is registered. The hits of all
// u-substrings for the same alignment are then ORed in a pipelined tree of
// 6-input reductions, giving one bit per alignment.
// Timing: align_hot reflects the window of clock t at clock t+1+LVL_OR, with
// LVL_OR = tree_levels(NSIG). The common stage, the four-version matching and
// the OR trees follow the original architecture. Choices of this design: SC is
// the earliest stage that holds the longest u-substring at every alignment,
// and a u-substring longer than six characters is still compared in one
// registered step (u-substrings of real rule sets are mostly four characters
// or fewer).
module usub_matcher
  import cs_pkg::*;
#(
  parameter int                 NSIG = H_NSIG,
  parameter sig_t [NSIG-1:0]    SIGS = H_SIGS,
  parameter int                 SC   = 1,     // common stage
  parameter int                 WIN  = 48     // window size in characters
) (
  input  logic              clk,
  input  logic              rst_n,
  input  char_line_t        win [WIN],
  output logic [Q-1:0]      align_hot
);

  `include "cs_geom.svh"

  localparam int LVL_OR = tree_levels(NSIG);

  if (Q*SC < geo_max_ulen() - 1 || Q*SC + Q - 1 >= WIN) begin : g_bad
    $error("usub_matcher: common stage outside the window");
  end

  logic [NSIG-1:0] hit_d [Q];
  logic [NSIG-1:0] hit_q [Q];

  always_comb begin
    for (int a = 0; a < Q; a++) begin
      for (int k = 0; k < NSIG; k++) begin
        hit_d[a][k] = 1'b1;
        for (int m = 0; m < int'(SIGS[k].ulen); m++) begin
          hit_d[a][k] = hit_d[a][k] &
            win[Q*SC + Q-1-a - m][sig_char(SIGS[k], int'(SIGS[k].uoff) + m)];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int a = 0; a < Q; a++) hit_q[a] <= '0;
    else        hit_q <= hit_d;
  end

  for (genvar a = 0; a < Q; a++) begin : g_or
    reduce_tree #(.N(NSIG), .IS_AND(1'b0), .LEVELS(LVL_OR)) u_or (
      .clk, .rst_n, .in(hit_q[a]), .out(align_hot[a]));
  end

endmodule
