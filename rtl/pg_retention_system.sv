// Power-gated example circuit with 2-phase state retention.
//
// Nine W-bit registers f1..f9 form the flip-flop dependency graph
//   f1 (self-loop) \                 / f5 (self-loop) -> f7
//                   > f3 -> f4 -----<
//   f2 (self-loop) /  |              \ f6 (self-loop) -> f8
//                     +--> f9
// f1, f2, f5, f6 hold their value unless their condition input is high (mux-feedback
// loop). f1..f8 are the worked example of the retention scheme; f9 is added so that
// the example also needs a 2nd-phase SBRFF. The allocation needs seven bits per
// bit-slice and wakes up in two cycles:
//   f1, f2, f5, f6 : 1st-phase SBRFFs (restored at the 1st wakeup edge)
//   f4             : 2-bit MBRFFs, banked W wide into one MBR-MBFF
//   f9             : 2nd-phase SBRFF (driven only by f3, which has no retention,
//                    so it cannot recompute at the 2nd edge; restored there)
//   f3, f7, f8     : no retention; recomputed by the logic during wakeup
// At the 1st wakeup edge f1, f2, f4, f5, f6 get back d^{l+1}; at the 2nd edge f4 gets
// d^{l+2} from its second latch, f9 from its 2nd-phase shadow latch, and f1, f2, f3,
// f5, f6, f7, f8 recompute d^{l+2}.
// For that recomputation to match, the inputs (in_a, in_b, c1, c2, c5, c6) during the
// 2nd wakeup cycle must equal those during the 2nd power-down cycle; this design
// assumes the environment holds them from the start of power-down until ready.
//
// The graph and allocation follow the worked example of the retention scheme; the
// combinational functions (adder, inverters, increments) and the synchronous clear
// are this design's own. rst_n resets the controller asynchronously and clears all
// registers synchronously (the retention cells have no reset pin). The switched supply
// is outside: nsleep goes out to the power switch and vvdd_ok comes back from it.
module pg_retention_system
  import lp_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                pd_req,
  input  logic                wake_req,
  input  logic                vvdd_ok,
  input  logic [W-1:0]        in_a,
  input  logic [W-1:0]        in_b,
  input  logic                c1,
  input  logic                c2,
  input  logic                c5,
  input  logic                c6,
  output logic                nsleep,
  output logic                ready,
  output ret_state_e          pg_state,
  output logic [8:0][W-1:0]   f            // f[0] = f1 ... f[8] = f9
);
  ret_ctrl_t ctrl;

  retention_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .pd_req(pd_req), .wake_req(wake_req),
    .ctrl(ctrl), .nsleep(nsleep), .state(pg_state), .ready(ready));

  // Next-state logic of the domain.
  logic [8:0][W-1:0] n;

  always_comb begin
    n[0] = c1 ? in_a : f[0];
    n[1] = c2 ? in_b : f[1];
    n[2] = f[0] + f[1];
    n[3] = ~f[2];
    n[4] = c5 ? f[3] : f[4];
    n[5] = c6 ? f[3] + W'(1) : f[5];
    n[6] = ~f[4];
    n[7] = f[5] + W'(1);
    n[8] = f[2] + W'(1);
    if (!rst_n) n = '0;
  end

  // 1st-phase SBRFFs: f1, f2, f5, f6.
  for (genvar b = 0; b < W; b++) begin : g_sbr
    for (genvar r = 0; r < 8; r++) begin : g_r
      if (r == 0 || r == 1 || r == 4 || r == 5) begin : g_cell
        sbrff u_ff (
          .clk(clk), .vvdd_ok(vvdd_ok), .save(ctrl.save1), .restore(ctrl.restore1),
          .d(n[r][b]), .q(f[r][b]));
      end
    end
  end

  // 2nd-phase SBRFFs: f9.
  for (genvar b = 0; b < W; b++) begin : g_sbr2
    sbrff u_ff (
      .clk(clk), .vvdd_ok(vvdd_ok), .save(ctrl.save2), .restore(ctrl.restore2),
      .d(n[8][b]), .q(f[8][b]));
  end

  // f4: W-bit MBR-MBFF of 2-bit MBRFFs.
  mbr_mbff #(.WIDTH(W)) u_f4 (
    .clk(clk), .vvdd_ok(vvdd_ok), .nret(ctrl.nret), .shift(ctrl.shift),
    .d(n[3]), .q(f[3]));

  // Plain registers on the switched supply: f3, f7, f8.
  always_ff @(posedge clk or negedge vvdd_ok) begin
    if (!vvdd_ok) begin
      f[2] <= '1;                 // content lost while the supply is off
      f[6] <= '1;
      f[7] <= '1;
    end else begin
      f[2] <= n[2];
      f[6] <= n[6];
      f[7] <= n[7];
    end
  end
endmodule
