// Signal stretcher of the state driven clock disable block (one flip-flop + one OR).
//
// g = en | en_delayed, where en_delayed is en registered on the free-running clock.
// g therefore stays high for one more cycle after en falls, which gives the gated
// flip-flops the extra edge they need to capture the return to their resting state.
// The flip-flop resets to 1 so that the first edge after reset is always let through,
// whatever reset value the gated flip-flops have (a choice of this design).
module signal_stretcher (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic g
);
  logic en_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_d <= 1'b1;
    else        en_d <= en;
  end

  assign g = en | en_d;
endmodule
