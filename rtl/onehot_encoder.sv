// onehot_encoder: pipelined one-hot to binary encoder.
//
// Turns the N signature match lines of an engine into the identifier of the
// matching signature. Identifier bit b is the OR of the lines whose index has
// bit b set; valid is the OR of all lines. Each OR is a pipelined tree of
// 6-input reductions, all of the same depth, so the bits arrive together.
// At most one line may be high at a time (an engine has one candidate
// signature at a time); with several, the identifier is their bitwise OR.
// Timing: LAT = max(1, tree_levels(N)) clocks from in to id/valid.
// A pipelined encoder is what the original architecture calls for; building it
// as one OR tree per identifier bit is this design's choice.
module onehot_encoder
  import cs_pkg::*;
#(
  parameter int N  = 8,
  parameter int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in,
  output logic          valid,
  output logic [IW-1:0] id
);

  localparam int LAT = imax(1, tree_levels(N));

  function automatic logic [N-1:0] bit_mask(int b);
    logic [N-1:0] m = '0;
    for (int k = 0; k < N; k++) m[k] = ((k >> b) & 1) != 0;
    return m;
  endfunction

  // An engine has one candidate signature at a time: at most one line high.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(in))
    else $error("onehot_encoder: several match lines high at once");

  reduce_tree #(.N(N), .IS_AND(1'b0), .LEVELS(LAT)) u_valid (
    .clk, .rst_n, .in(in), .out(valid));

  for (genvar b = 0; b < IW; b++) begin : g_bit
    localparam logic [N-1:0] MASK = bit_mask(b);
    reduce_tree #(.N(N), .IS_AND(1'b0), .LEVELS(LAT)) u_bit (
      .clk, .rst_n, .in(in & MASK), .out(id[b]));
  end

endmodule
