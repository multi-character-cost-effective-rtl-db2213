// naive_matcher: multi-character shift-and-compare for signatures that the
// matching engines do not take.
//
// Short signatures (seven characters or fewer), single-string u-sets and
// signatures that fail the security threshold are matched the naive way: the
// comparator of each signature is replicated Q times, once for each lane in
// which its last character can arrive, and reads the character lines of the
// shared pipeline at fixed ages (character i of a signature of length L ending
// in lane a has age Q-1-a + L-1-i in stage 0). Each comparator ANDs all the
// signature's lines and is registered.
// Timing: a signature whose last character was presented in lane a at clock c
// sets hit[k][a] in clock c + LATENCY (LATENCY = 2). Several bits may be set
// in the same clock. The original architecture only names this naive
// replication; the one-step comparators and the per-lane output are this
// design's choices, and single-signature sets are matched here instead of by
// a separate automaton.
module naive_matcher
  import cs_pkg::*;
#(
  parameter int                 NSIG = N_NSIG,
  parameter sig_t [NSIG-1:0]    SIGS = N_SIGS,
  parameter int                 WIN  = 48
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  char_line_t               win [WIN],
  output logic [NSIG-1:0][Q-1:0]   hit
);

  `include "cs_geom.svh"

  localparam int LATENCY  = 2;
  localparam int NEED_WIN = Q - 1 + geo_max_len();

  if (WIN < NEED_WIN) begin : g_bad
    $error("naive_matcher: pipeline window too short for this signature set");
  end

  logic [NSIG-1:0][Q-1:0] hit_d;

  always_comb begin
    for (int k = 0; k < NSIG; k++) begin
      for (int a = 0; a < Q; a++) begin
        hit_d[k][a] = 1'b1;
        for (int i = 0; i < int'(SIGS[k].len); i++)
          hit_d[k][a] = hit_d[k][a] &
            win[Q-1-a + int'(SIGS[k].len)-1-i][sig_char(SIGS[k], i)];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hit <= '0;
    else        hit <= hit_d;
  end

endmodule
