// A group of K flip-flops sharing one gated clock.
//
// MODE picks the clock disable logic that drives the group's ICG:
//   CG_NONE   - no gating, the flip-flops see the free clock
//   CG_LOGIC  - the enable is the design's own load enable le (idle-logic gating)
//   CG_STATE0 - cd_state with an OR-tree (group rests at 0)
//   CG_STATE1 - cd_state with an inverted AND-tree (group rests at 1)
//   CG_TOGGLE - cd_toggle, one XOR per flip-flop and an OR-tree
// In every mode the group behaves like K plain flip-flops that load d on each rising
// clock edge (or, for CG_LOGIC, on each edge where le is high); the gating only drops
// edges that would not change q. g is the enable presented to the ICG and is
// brought out so a testbench can count gated cycles.
//
// Ports: clk, rst_n (async, active low, q resets to RESET_VAL), d, le, q, g.
module cg_group
  import lp_pkg::*;
#(
  parameter int unsigned  K         = 8,
  parameter cg_mode_e     MODE      = CG_STATE0,
  parameter logic [K-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [K-1:0] d,
  input  logic         le,
  output logic [K-1:0] q,
  output logic         g
);
  logic gclk;

  generate
    if (MODE == CG_NONE) begin : g_none
      assign g    = 1'b1;
      assign gclk = clk;
    end else begin : g_gated
      if (MODE == CG_LOGIC) begin : g_logic
        assign g = le;
      end else if (MODE == CG_TOGGLE) begin : g_toggle
        cd_toggle #(.K(K)) u_cd (.d(d), .q(q), .g(g));
      end else begin : g_state
        cd_state #(.K(K), .STATE1(MODE == CG_STATE1)) u_cd (
          .clk(clk), .rst_n(rst_n), .d(d), .g(g));
      end
      icg u_icg (.clk(clk), .en(g), .gclk(gclk));
    end
  endgenerate

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) q <= RESET_VAL;
    else        q <= d;
  end
endmodule
