// XOR-free clock disable block of flip-flop state driven clock gating.
//
// For a group whose flip-flops rest at 0 most of the time (STATE1 = 0) an OR-tree over
// the K D inputs asserts en when any of them is 1. For a group resting at 1 (STATE1 = 1)
// an AND-tree over the D inputs followed by an inverter asserts en when any of them
// is 0. No flip-flop output is looked at, so no XOR is needed. en then goes through
// the signal stretcher, so the ICG enable g stays high one cycle longer than en and the
// last transition back to the resting state is still clocked in.
//
// Ports: clk/rst_n (free clock, async active-low reset of the stretcher), d (next
// inputs of the gated flip-flops), g (enable to the ICG). Latency: g follows d
// combinationally and falls one cycle after the last non-resting D value.
module cd_state #(
  parameter int unsigned K      = 8,    // flip-flops in the group
  parameter bit          STATE1 = 1'b0  // 0: state-0 group (OR-tree), 1: state-1 group (AND-tree)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  output logic         g
);
  logic en;

  always_comb begin
    if (STATE1) en = ~(&d);   // AND-tree + inverter
    else        en = |d;      // OR-tree
  end

  signal_stretcher u_stretch (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (en),
    .g    (g)
  );
endmodule
