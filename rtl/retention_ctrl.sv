// Controller of the 2-phase retention scheme (power-down and wakeup in two cycles each).
//
// A state machine on the rising clock edge walks through
//   RUN -pd_req-> PD1 -> PD2 -> PD3 -> SLEEP -wake_req-> PWRON -> WK1 -> RUN.
// The rising edge that ends PD1 is the 1st power-down edge (flip-flops hold d^{l+1}),
// the one that ends PD2 the 2nd (d^{l+2}). The edge that ends PWRON is the 1st wakeup
// edge (1st-phase SBRFFs and MBRFFs restore d^{l+1}), the one that ends WK1 the 2nd
// (2nd-phase SBRFFs and MBRFFs restore d^{l+2}); after it the domain holds exactly
// the state it had after the 2nd power-down edge.
//
// The retention controls are registered on the falling edge, so they never change
// next to a rising edge:
//   save1    high from mid-PD1 to mid-PD2   (closes on d^{l+1})
//   save2    high from mid-PD2 to mid-PD3   (closes on d^{l+2})
//   nret     low  from mid-PD3 to mid-cycle after WK1
//   nsleep   low  from mid-SLEEP to mid-PWRON
//   restore1 high from mid-PWRON to mid-WK1 (covers the 1st wakeup edge)
//   restore2 high from mid-WK1 to mid-RUN   (covers the 2nd wakeup edge)
//   shift    one half-cycle pulse in each sequence: the high phase right after the
//            1st power-down edge (RL1 -> RL2 while RL1 = d^{l+1}) and the low phase
//            before the 2nd wakeup edge (RL1 -> RL2 after RL2 was read).
// shift is built from the clock itself: that is why this module mixes clk into logic.
// Requests are sampled on rising edges; pd_req is honoured only in RUN, wake_req only
// in SLEEP. The sequence follows the cycle table of the retention scheme; the state
// encoding, the PD3 guard cycle and the half-cycle placement are choices of this design.
module retention_ctrl
  import lp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pd_req,
  input  logic       wake_req,
  output ret_ctrl_t  ctrl,
  output logic       nsleep,
  output ret_state_e state,
  output logic       ready     // domain state valid (RUN)
);
  ret_state_e state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      RS_RUN:   if (pd_req)   state_n = RS_PD1;
      RS_PD1:                 state_n = RS_PD2;
      RS_PD2:                 state_n = RS_PD3;
      RS_PD3:                 state_n = RS_SLEEP;
      RS_SLEEP: if (wake_req) state_n = RS_PWRON;
      RS_PWRON:               state_n = RS_WK1;
      RS_WK1:                 state_n = RS_RUN;
      default:                state_n = RS_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= RS_RUN;
    else        state <= state_n;
  end

  // Falling-edge registered controls.
  logic sh_pd, sh_wk;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl.save1    <= 1'b0;
      ctrl.save2    <= 1'b0;
      ctrl.restore1 <= 1'b0;
      ctrl.restore2 <= 1'b0;
      ctrl.nret     <= 1'b1;
      nsleep        <= 1'b1;
      sh_pd         <= 1'b0;
      sh_wk         <= 1'b0;
    end else begin
      ctrl.save1    <= (state == RS_PD1);
      ctrl.save2    <= (state == RS_PD2);
      ctrl.restore1 <= (state == RS_PWRON);
      ctrl.restore2 <= (state == RS_WK1);
      ctrl.nret     <= !(state inside {RS_PD3, RS_SLEEP, RS_PWRON, RS_WK1});
      nsleep        <= (state != RS_SLEEP);
      sh_pd         <= (state == RS_PD1);
      sh_wk         <= (state == RS_WK1);
    end
  end

  // sh_pd is high across the 1st power-down edge: pass its clock-high half after it.
  // sh_wk rises mid-WK1: pass the clock-low half that ends at the 2nd wakeup edge.
  assign ctrl.shift = (sh_pd & clk) | (sh_wk & ~clk);

  assign ready = (state == RS_RUN);
endmodule
