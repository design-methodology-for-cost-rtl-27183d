// Behavioural model of a single-bit retention flip-flop (SBRFF).
//
// A master flip-flop on the switched supply plus an always-on shadow latch.
// While SAVE is high the shadow latch follows Q; when SAVE falls it keeps the value
// through sleep. A rising CLK edge loads the shadow value instead of D while RESTORE
// is high. The same cell is a "1st-phase" or a "2nd-phase" SBRFF depending only on
// which SAVE/RESTORE pair of the retention controller drives it.
//
// Power is modelled by vvdd_ok: while it is low the switched supply is off and the
// flip-flop content is lost; the model forces it to LOST, so a missing restore shows
// in a two-state simulator wherever the saved bit differs from LOST.
// Being a standard-cell model with a supply, this file is behavioural; the shadow
// latch is intended. Pin names SAVE/RESTORE follow the usual SBRFF symbol; the
// exact latch timing is a choice of this model.
module sbrff #(
  parameter logic LOST = 1'b1   // value the flip-flop shows after losing its supply
) (
  input  logic clk,
  input  logic vvdd_ok,   // switched supply present
  input  logic save,      // shadow latch transparent
  input  logic restore,   // load shadow value at the next rising clock edge
  input  logic d,
  output logic q
);
  logic shadow;

  always_latch begin
    if (save) shadow = q;
  end

  always_ff @(posedge clk or negedge vvdd_ok) begin
    if (!vvdd_ok)     q <= LOST;      // content lost while the supply is off
    else if (restore) q <= shadow;
    else              q <= d;
  end
endmodule
