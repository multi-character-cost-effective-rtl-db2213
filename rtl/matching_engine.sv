// matching_engine: string matching for one h-set or t-set.
//
// The five functional blocks of an engine in sequence:
//   1. usub_matcher   - u-substrings matched at the common stage SC, one bit
//                       per alignment after a pipelined OR tree;
//   2. align_encoder  - priority encoder giving the candidate's alignment;
//   3. char_matrix    - alignment correction, one 4-to-1 mux per used
//                       (column, character);
//   4. sig_matcher    - 6-character comparators and AND trees, one per
//                       signature, working as if one character came per clock;
//   5. onehot_encoder - pipelined encoder giving the signature identifier.
// Because no two signatures of a set can be candidates at once, the matrix and
// the comparators serve every alignment with no replication.
//
// Geometry (all derived from SIGS at elaboration): U is the u-substring column,
// NCOL the matrix width. The alignment code reaches the matrix LA = 2 +
// tree_levels(NSIG) clocks after the u-substring sat at stage SC; D extra
// delay stages are added only if the signatures' tails have not yet entered
// the pipeline by then. The matrix taps stage TAP = SC + LA + D.
// Timing: a signature whose u-substring's first character was presented at
// the input in clock c is reported (match_valid, match_id) in clock
// c + LATENCY. The pipeline window must hold NEED_WIN characters.
// The five blocks and their order follow the original architecture; the
// register placement, hence LATENCY, and the delay D are this design's own.
module matching_engine
  import cs_pkg::*;
#(
  parameter int                 NSIG = H_NSIG,
  parameter sig_t [NSIG-1:0]    SIGS = H_SIGS,
  parameter int                 WIN  = 48,
  parameter int                 IW   = (NSIG > 1) ? $clog2(NSIG) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  char_line_t     win [WIN],
  output logic           match_valid,
  output logic [IW-1:0]  match_id,
  output logic           cand_valid,   // some u-substring detected
  output align_t         cand_align,   // its alignment (lane)
  output logic           cand_multi    // several alignments detected at once
);

  `include "cs_geom.svh"

  localparam int U        = geo_ucol();
  localparam int NCOL     = geo_ncols();
  localparam int SC       = cdiv(geo_max_ulen() - 1, Q);
  localparam int LA       = 2 + tree_levels(NSIG);
  localparam int TNEED    = cdiv(imax(0, NCOL - 1 - U), Q);
  localparam int D        = imax(0, TNEED - SC - LA);
  localparam int TAP      = SC + LA + D;
  localparam int LSIG     = 1 + tree_levels(geo_max_chunks());
  localparam int LENC     = imax(1, tree_levels(NSIG));
  localparam int LATENCY  = 1 + SC + LA + D + 1 + LSIG + LENC;
  localparam int NEED_WIN = Q*TAP + Q + U;

  if (WIN < NEED_WIN) begin : g_bad
    $error("matching_engine: pipeline window too short for this signature set");
  end

  logic [Q-1:0] align_hot;
  logic         al_valid;
  align_t       al_code;
  logic         al_multi;
  logic         mx_in_valid;
  align_t       mx_in_align;
  logic         mx_valid;
  char_line_t   col [NCOL];
  logic [NSIG-1:0] sig_hit;

  usub_matcher #(.NSIG(NSIG), .SIGS(SIGS), .SC(SC), .WIN(WIN)) u_usub (
    .clk, .rst_n, .win, .align_hot);

  align_encoder u_aenc (
    .clk, .rst_n, .hot(align_hot), .valid(al_valid), .align(al_code), .multi(al_multi));

  // Optional delay of the alignment code until the signature tails arrive.
  if (D == 0) begin : g_nodly
    assign mx_in_valid = al_valid;
    assign mx_in_align = al_code;
  end else begin : g_dly
    logic   dv [D];
    align_t da [D];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < D; i++) begin
          dv[i] <= 1'b0;
          da[i] <= '0;
        end
      end else begin
        dv[0] <= al_valid;
        da[0] <= al_code;
        for (int i = 1; i < D; i++) begin
          dv[i] <= dv[i-1];
          da[i] <= da[i-1];
        end
      end
    end
    assign mx_in_valid = dv[D-1];
    assign mx_in_align = da[D-1];
  end

  char_matrix #(.NSIG(NSIG), .SIGS(SIGS), .TAP(TAP), .WIN(WIN)) u_mtx (
    .clk, .rst_n, .win, .in_valid(mx_in_valid), .in_align(mx_in_align),
    .out_valid(mx_valid), .col);

  sig_matcher #(.NSIG(NSIG), .SIGS(SIGS)) u_sig (
    .clk, .rst_n, .in_valid(mx_valid), .col, .hit(sig_hit));

  onehot_encoder #(.N(NSIG), .IW(IW)) u_enc (
    .clk, .rst_n, .in(sig_hit), .valid(match_valid), .id(match_id));

  assign cand_valid = al_valid;
  assign cand_align = al_code;
  assign cand_multi = al_multi;

endmodule
