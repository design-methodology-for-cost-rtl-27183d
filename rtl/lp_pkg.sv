// Shared types for the clock-gating and state-retention RTL.
//
// cg_mode_e selects how a group of flip-flops gets its clock:
//   CG_NONE   : free-running clock (ungated flip-flops)
//   CG_LOGIC  : idle-logic gating, the enable comes from the design itself
//   CG_STATE0 : state driven gating for a group that sits at 0 most of the time (OR-tree)
//   CG_STATE1 : state driven gating for a group that sits at 1 most of the time (AND-tree)
//   CG_TOGGLE : input-toggling gating (XOR per flip-flop + OR-tree)
// ret_state_e enumerates the phases of the 2-cycle power-down / 2-cycle wakeup sequence.
package lp_pkg;

  typedef enum logic [2:0] {
    CG_NONE   = 3'd0,
    CG_LOGIC  = 3'd1,
    CG_STATE0 = 3'd2,
    CG_STATE1 = 3'd3,
    CG_TOGGLE = 3'd4
  } cg_mode_e;

  typedef enum logic [2:0] {
    RS_RUN   = 3'd0,  // normal operation
    RS_PD1   = 3'd1,  // cycle ending in the 1st power-down edge
    RS_PD2   = 3'd2,  // cycle ending in the 2nd power-down edge
    RS_PD3   = 3'd3,  // retention latches closed, supply still on
    RS_SLEEP = 3'd4,  // switched supply off
    RS_PWRON = 3'd5,  // supply back on, cycle ending in the 1st wakeup edge
    RS_WK1   = 3'd6   // cycle ending in the 2nd wakeup edge
  } ret_state_e;

  // Retention control bundle driven by the controller (all active high except nret/nsleep).
  typedef struct packed {
    logic save1;     // 1st-phase SBRFF shadow latch transparent
    logic save2;     // 2nd-phase SBRFF shadow latch transparent
    logic restore1;  // 1st-phase SBRFF loads shadow value at the clock edge
    logic restore2;  // 2nd-phase SBRFF loads shadow value at the clock edge
    logic nret;      // 2-bit MBRFF: RL1 transparent when high, restore from RL2 when low
    logic shift;     // 2-bit MBRFF: RL2 transparent when high
  } ret_ctrl_t;

endpackage
