// Behavioural model of a multi-bit retention multi-bit flip-flop (MBR-MBFF).
//
// WIDTH 2-bit MBRFFs merged into one cell: in silicon they share the clock inverters
// and the always-on inverters of NRET and SHIFT; logically each bit is an
// independent 2-bit MBRFF on common CLK, NRET and SHIFT (see mbrff_2b for the
// power-down and wakeup timing). WIDTH = 2 is the 2-bit/2-bit cell; banking went up
// to 8 bits per cell.
module mbr_mbff #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             vvdd_ok,
  input  logic             nret,
  input  logic             shift,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mbrff_2b u_bit (
      .clk(clk), .vvdd_ok(vvdd_ok), .nret(nret), .shift(shift), .d(d[i]), .q(q[i]));
  end
endmodule
