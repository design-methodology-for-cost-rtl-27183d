// Register bank of N flip-flops clock-gated by the integrated flow:
// idle-logic gating first, then state driven gating for flip-flops that rest at 0 or 1,
// then input-toggling gating for the rest, and the remainder left ungated.
//
// The N flip-flops are laid out, from bit 0 upward, as:
//   NL           logic-gated flip-flops (one group, enable = le)
//   G0 groups of K0 state-0 flip-flops   (OR-tree clock disable)
//   G1 groups of K1 state-1 flip-flops   (inverted AND-tree clock disable)
//   GT groups of KT toggling flip-flops  (XOR + OR-tree clock disable)
//   NU ungated flip-flops
// Which flip-flop belongs to which group is fixed by these parameters; in a real flow
// it comes from the state-profile driven grouping. Function: q loads d on every rising
// edge, except that logic-gated bits load only while le is high. The bank's gating is
// invisible at q. g reports the ICG enable of each group in the order above
// (logic, state-0 groups, state-1 groups, toggling groups).
module sdcg_regbank
  import lp_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned NL = 4,
  parameter int unsigned K0 = 8,
  parameter int unsigned G0 = 1,
  parameter int unsigned K1 = 8,
  parameter int unsigned G1 = 1,
  parameter int unsigned KT = 8,
  parameter int unsigned GT = 1,
  parameter int unsigned NU = N - NL - K0*G0 - K1*G1 - KT*GT,
  parameter int unsigned NG = 1 + G0 + G1 + GT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  d,
  input  logic          le,
  output logic [N-1:0]  q,
  output logic [NG-1:0] g
);
  localparam int unsigned B0 = NL;              // first state-0 bit
  localparam int unsigned B1 = B0 + K0*G0;      // first state-1 bit
  localparam int unsigned BT = B1 + K1*G1;      // first toggling bit
  localparam int unsigned BU = BT + KT*GT;      // first ungated bit

  initial begin
    assert (NL + K0*G0 + K1*G1 + KT*GT + NU == N)
      else $error("sdcg_regbank: group sizes do not add up to N");
  end

  cg_group #(.K(NL), .MODE(CG_LOGIC), .RESET_VAL('0)) u_logic (
    .clk(clk), .rst_n(rst_n), .d(d[B0-1:0]), .le(le), .q(q[B0-1:0]), .g(g[0]));

  for (genvar i = 0; i < G0; i++) begin : g_s0
    cg_group #(.K(K0), .MODE(CG_STATE0), .RESET_VAL('0)) u_grp (
      .clk(clk), .rst_n(rst_n), .d(d[B0+i*K0 +: K0]), .le(1'b1),
      .q(q[B0+i*K0 +: K0]), .g(g[1+i]));
  end

  for (genvar i = 0; i < G1; i++) begin : g_s1
    cg_group #(.K(K1), .MODE(CG_STATE1), .RESET_VAL('1)) u_grp (
      .clk(clk), .rst_n(rst_n), .d(d[B1+i*K1 +: K1]), .le(1'b1),
      .q(q[B1+i*K1 +: K1]), .g(g[1+G0+i]));
  end

  for (genvar i = 0; i < GT; i++) begin : g_tg
    cg_group #(.K(KT), .MODE(CG_TOGGLE), .RESET_VAL('0)) u_grp (
      .clk(clk), .rst_n(rst_n), .d(d[BT+i*KT +: KT]), .le(1'b1),
      .q(q[BT+i*KT +: KT]), .g(g[1+G0+G1+i]));
  end

  if (NU > 0) begin : g_ung
    logic ung_g;
    cg_group #(.K(NU), .MODE(CG_NONE), .RESET_VAL('0)) u_grp (
      .clk(clk), .rst_n(rst_n), .d(d[N-1:BU]), .le(1'b1), .q(q[N-1:BU]), .g(ung_g));
  end
endmodule
