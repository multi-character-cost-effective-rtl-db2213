// content_scanner: multi-character string matcher for network content
// scanning, four characters (32 bits) per clock.
//
// The signature database is split off-line into parts:
//   - h-sets and t-sets: sets of long signatures whose unique substrings
//     (u-substrings) detect both the candidate signature and its alignment in
//     the 4-character word; each set is one matching_engine, generated from
//     the engine table in cs_pkg (NENG, ENG_NSIG, ENG_SIGS),
//   - the short signatures (N_SIGS), matched by the naive_matcher.
// The four input decoders and the character-line pipeline are shared by all
// of them. The example database has one h-set (engine 0) and one t-set
// (engine 1); a database of several thousand signatures in seven h/t-sets
// only needs a larger table.
//
// Interface: in_chars[l] is lane l of the input word, lane 0 the earliest
// character in the stream; in_valid[l] marks lanes that carry data (an
// invalid lane matches nothing). No back-pressure: a word is accepted every
// clock. Outputs, indexed by engine: a match flag and the signature identifier
// (index in the engine's set), plus the candidate flag, candidate alignment
// and double-detection flag (several u-substrings in one word); for the
// naive matcher a hit per signature and per lane of its last character.
// Timing: see matching_engine (LATENCY counted from the clock that carried the
// u-substring's first character; 9 for the example sets) and naive_matcher
// (LATENCY = 2 from the clock that carried the last character). DEPTH is the
// smallest depth the example h-set needs (its window is 43 characters).
// The structure follows the original architecture; the example database, the
// per-engine identifiers and the absence of a result buffer are this design's
// choices.
module content_scanner
  import cs_pkg::*;
#(
  parameter int DEPTH = 12    // pipeline stages of Q characters
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  char_t [Q-1:0]            in_chars,
  input  logic  [Q-1:0]            in_valid,
  output logic [NENG-1:0]          match_valid,
  output logic [NENG-1:0][IDW-1:0] match_id,
  output logic [NENG-1:0]          cand_valid,
  output align_t [NENG-1:0]        cand_align,
  output logic [NENG-1:0]          cand_multi,
  output logic [N_NSIG-1:0][Q-1:0] n_hit
);

  localparam int WIN = DEPTH * Q;

  char_line_t win [WIN];

  char_pipeline #(.DEPTH(DEPTH)) u_pipe (
    .clk, .rst_n, .in_chars, .in_valid, .win);

  for (genvar e = 0; e < NENG; e++) begin : g_eng
    matching_engine #(
      .NSIG(ENG_NSIG[e]), .SIGS(ENG_SIGS[e][ENG_NSIG[e]-1:0]), .WIN(WIN), .IW(IDW)
    ) u_engine (
      .clk, .rst_n, .win,
      .match_valid(match_valid[e]), .match_id(match_id[e]),
      .cand_valid(cand_valid[e]), .cand_align(cand_align[e]), .cand_multi(cand_multi[e]));
  end

  naive_matcher #(.NSIG(N_NSIG), .SIGS(N_SIGS), .WIN(WIN)) u_naive (
    .clk, .rst_n, .win, .hit(n_hit));

endmodule
