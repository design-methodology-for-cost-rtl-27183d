// Clock disable block of input-toggling clock gating.
//
// One 2-input XOR per flip-flop compares the next input D with the present output Q,
// and an OR-tree merges the K results: g = (D1^Q1) | ... | (DK^QK). g is high when at
// least one flip-flop of the group is about to change, i.e. the group needs a clock edge.
// Purely combinational; g feeds the enable of an ICG.
module cd_toggle #(
  parameter int unsigned K = 8   // flip-flops in the group
) (
  input  logic [K-1:0] d,
  input  logic [K-1:0] q,
  output logic         g
);
  always_comb g = |(d ^ q);
endmodule
