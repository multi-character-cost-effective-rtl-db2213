// reduce_tree: pipelined OR or AND reduction of N bits to one.
//
// Each level combines groups of TREE_FI (6) bits, the size one 6-input LUT
// takes, and registers the result, so the tree costs one clock per level.
// LEVELS may be set above the natural depth; the extra levels are plain
// registers, which lets several trees of different size finish together.
// Timing: out follows in after LEVELS clocks (combinational when LEVELS = 0).
// Reset clears every level, so no stale result leaves the tree.
// Pipelined LUT trees are what the original architecture uses for its ORs;
// the fan-in of six and the padding levels are this design's choices.
module reduce_tree
  import cs_pkg::*;
#(
  parameter int N      = 6,
  parameter bit IS_AND = 1'b0,
  parameter int LEVELS = tree_levels(N)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         out
);

  function automatic int width_at(int l);
    int w = N;
    for (int i = 0; i < l; i++) w = cdiv(w, TREE_FI);
    return w;
  endfunction

  if (LEVELS < tree_levels(N)) begin : g_bad
    $error("reduce_tree: LEVELS below the depth N inputs need");
  end

  if (LEVELS == 0) begin : g_comb
    assign out = in[0];
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int WI = width_at(l);
      localparam int WO = width_at(l + 1);
      logic [WI-1:0] prev;
      logic [WO-1:0] nxt;
      logic [WO-1:0] q;

      if (l == 0) begin : g_first
        assign prev = in;
      end else begin : g_next
        assign prev = g_lvl[l-1].q;
      end

      always_comb begin
        for (int o = 0; o < WO; o++) begin
          nxt[o] = IS_AND;
          for (int k = 0; k < TREE_FI; k++) begin
            if (o*TREE_FI + k < WI) begin
              nxt[o] = IS_AND ? (nxt[o] & prev[o*TREE_FI + k])
                              : (nxt[o] | prev[o*TREE_FI + k]);
            end
          end
        end
      end

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) q <= '0;
        else        q <= nxt;
      end
    end
    assign out = g_lvl[LEVELS-1].q[0];
  end

endmodule
