// char_pipeline: decoders and the shared pipeline of character lines.
//
// Q characters enter each clock. They are decoded to one-hot character lines
// and shifted through DEPTH register stages, shared by every matching engine
// and the naive matcher. The whole pipeline is exposed as a window indexed
// by character age: win[0] is the newest character (lane Q-1 of stage 0),
// win[Q*r + (Q-1-l)] is lane l of stage r. Lane 0 is the earliest character
// of a word. A character presented at clock c is in stage r during clock
// c+1+r. Reset empties the pipeline (all lines zero). The decoders and the
// shared pipeline follow the original architecture; the lane order, the
// per-lane valid and the reset are choices of this design.
module char_pipeline
  import cs_pkg::*;
#(
  parameter int DEPTH = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  char_t [Q-1:0]     in_chars,
  input  logic  [Q-1:0]     in_valid,
  output char_line_t        win [DEPTH*Q]
);

  char_line_t dec [Q];
  char_line_t st  [DEPTH][Q];

  for (genvar l = 0; l < Q; l++) begin : g_dec
    char_decoder u_dec (.ch(in_chars[l]), .valid(in_valid[l]), .line(dec[l]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < DEPTH; r++)
        for (int l = 0; l < Q; l++) st[r][l] <= '0;
    end else begin
      st[0] <= dec;
      for (int r = 1; r < DEPTH; r++) st[r] <= st[r-1];
    end
  end

  always_comb begin
    for (int r = 0; r < DEPTH; r++)
      for (int l = 0; l < Q; l++) win[Q*r + (Q-1-l)] = st[r][l];
  end

endmodule
