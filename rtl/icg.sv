// Integrated clock gating cell (latch + AND).
//
// The enable is captured by a latch that is transparent while CLK is low, so it is
// frozen during the high phase and GCLK = CLK & latched_en has no glitches. A rising
// edge of CLK reaches GCLK only when EN was high just before that edge, so EN is
// set up in the cycle before the edge it is to let through.
//
// Ports: clk (free clock), en (active-high clock enable), gclk (gated clock).
// The latch is intended: it is the storage element of the cell.
module icg (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;
endmodule
