// Behavioural model of the 2-bit multi-bit retention flip-flop (2-bit MBRFF).
//
// Two always-on retention latches sit behind the master flip-flop:
//   RL1 is transparent while NRET is high and follows Q; when NRET falls it keeps
//       the last state before sleep (d^{l+2}).
//   RL2 is transparent while SHIFT is high and copies RL1. No inverter-chain delay is
//       used: SHIFT is a separate pin.
// Power down: Q = d^{l+1} after the 1st edge, a SHIFT pulse copies it into RL2, Q =
// d^{l+2} after the 2nd edge, then NRET falls and RL1 keeps d^{l+2}.
// Wakeup (NRET low): the 1st edge loads Q from RL2 (d^{l+1}), a SHIFT pulse moves RL1
// into RL2, the 2nd edge loads d^{l+2}; then NRET rises and Q follows D again.
// SHIFT must not be high across a rising edge at which RL1 or Q changes; the retention
// controller guarantees that.
//
// Power is modelled by vvdd_ok as in the SBRFF model (content forced to LOST while off).
// This is a cell model, hence behavioural; the two latches are intended.
module mbrff_2b #(
  parameter logic LOST = 1'b1   // value the flip-flop shows after losing its supply
) (
  input  logic clk,
  input  logic vvdd_ok,
  input  logic nret,
  input  logic shift,
  input  logic d,
  output logic q
);
  logic rl1, rl2;

  always_latch begin
    if (nret) rl1 = q;
  end

  always_latch begin
    if (shift) rl2 = rl1;
  end

  always_ff @(posedge clk or negedge vvdd_ok) begin
    if (!vvdd_ok)   q <= LOST;
    else if (!nret) q <= rl2;
    else            q <= d;
  end
endmodule
