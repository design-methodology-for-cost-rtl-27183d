// Top level: the clock-gated register bank and the power-gated retention example, side
// by side on one clock and reset.
//
// Clock gating side: cg_d/cg_q are the N = 32 next/present values of the bank, cg_le
// the load enable of its logic-gated bits, cg_g the ICG enable of each clock-gating
// group (see sdcg_regbank for the bit layout).
// Power gating side: pd_req/wake_req start the 2-cycle power-down and 2-cycle wakeup
// sequences; pg_nsleep goes to the external power switch and pg_vvdd_ok (its
// supply-good) comes back; pg_f shows the nine W-bit registers of the example circuit,
// valid whenever pg_ready is high.
module cgpg_top
  import lp_pkg::*;
#(
  parameter int unsigned N  = 32,
  parameter int unsigned NG = 4,
  parameter int unsigned W  = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // clock-gated register bank
  input  logic [N-1:0]      cg_d,
  input  logic              cg_le,
  output logic [N-1:0]      cg_q,
  output logic [NG-1:0]     cg_g,
  // power-gated domain with state retention
  input  logic              pd_req,
  input  logic              wake_req,
  input  logic              pg_vvdd_ok,
  input  logic [W-1:0]      pg_in_a,
  input  logic [W-1:0]      pg_in_b,
  input  logic [3:0]        pg_cond,     // {c6, c5, c2, c1}
  output logic              pg_nsleep,
  output logic              pg_ready,
  output ret_state_e        pg_state,
  output logic [8:0][W-1:0] pg_f
);
  sdcg_regbank #(.N(N), .NG(NG)) u_cg (
    .clk(clk), .rst_n(rst_n), .d(cg_d), .le(cg_le), .q(cg_q), .g(cg_g));

  pg_retention_system #(.W(W)) u_pg (
    .clk(clk), .rst_n(rst_n), .pd_req(pd_req), .wake_req(wake_req),
    .vvdd_ok(pg_vvdd_ok), .in_a(pg_in_a), .in_b(pg_in_b),
    .c1(pg_cond[0]), .c2(pg_cond[1]), .c5(pg_cond[2]), .c6(pg_cond[3]),
    .nsleep(pg_nsleep), .ready(pg_ready), .pg_state(pg_state), .f(pg_f));
endmodule
