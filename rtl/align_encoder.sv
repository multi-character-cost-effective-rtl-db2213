// align_encoder: alignment codification of a matching engine.
//
// A high-priority one-hot to binary encoder: of the alignments whose
// u-substring detector fired, the lowest lane wins, i.e. the signature that
// starts earliest in the data flow. The security-threshold partitioning of the
// signature set guarantees that when two u-substrings fire together, the
// earlier one belongs to the candidate signature. Besides the encoded
// alignment the encoder reports whether any alignment fired (valid) and
// whether more than one did (multi, a double match).
// Timing: one register, outputs follow hot by one clock. Reset clears valid.
// The priority rule follows the original architecture; the multi flag and the
// register are this design's additions.
module align_encoder
  import cs_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [Q-1:0]  hot,
  output logic          valid,
  output align_t        align,
  output logic          multi
);

  align_t enc;

  always_comb begin
    enc = '0;
    for (int a = Q-1; a >= 0; a--) if (hot[a]) enc = align_t'(a);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      align <= '0;
      multi <= 1'b0;
    end else begin
      valid <= |hot;
      align <= enc;
      multi <= (hot & (hot - 1'b1)) != '0;
    end
  end

endmodule
