// Self-checking testbench for sdcg_regbank at its default layout (32 flip-flops:
// 4 logic-gated, 8 state-0, 8 state-1, 8 toggling, 4 ungated). The bank is compared
// every cycle with a plain 32-bit reference register; each group's clock must be
// switched off at least once, and the state-0/state-1 stretcher must be seen holding
// the clock on for the cycle after the group returns to rest.
module sdcg_regbank_tb;
  localparam int N = 32;
  logic clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  logic [N-1:0] d, q, r;
  logic [3:0] g;
  int checks = 0, failures = 0;
  int off[4] = '{0, 0, 0, 0};
  int stretch0 = 0, stretch1 = 0;
  logic rest0_prev, rest1_prev;

  sdcg_regbank dut (.clk(clk), .rst_n(rst_n), .d(d), .le(le), .q(q), .g(g));

  always #5 clk = ~clk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= {4'h0, 8'h00, 8'hFF, 8'h00, 4'h0};
    else begin
      if (le) r[3:0] <= d[3:0];
      r[N-1:4] <= d[N-1:4];
    end
  end

  function automatic logic [7:0] sparse(input int p);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = ($urandom_range(1, p) == 1);
    return v;
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = {4'h0, 8'h00, 8'hFF, 8'h00, 4'h0};
    rest0_prev = 1'b0; rest1_prev = 1'b0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      checks++;
      if (q !== r) begin
        failures++;
        $display("FAIL t=%0d q=%h exp=%h", t, q, r);
      end
      le        = ($urandom_range(0, 3) == 0);
      d[3:0]    = 4'($urandom);
      d[11:4]   = (t % 30 < 10) ? sparse(16) : 8'h00;
      d[19:12]  = (t % 30 < 10) ? ~sparse(16) : 8'hFF;
      d[27:20]  = ($urandom_range(0, 7) == 0) ? 8'($urandom) : q[27:20];
      d[31:28]  = 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) if (!g[i]) off[i]++;
      // stretcher: group at rest now but was not at rest last cycle, clock still on
      if (d[11:4] == 8'h00 && !rest0_prev && g[1]) stretch0++;
      if (d[19:12] == 8'hFF && !rest1_prev && g[2]) stretch1++;
      rest0_prev = (d[11:4] == 8'h00);
      rest1_prev = (d[19:12] == 8'hFF);
    end
    checks++;
    if (off[0] == 0 || off[1] == 0 || off[2] == 0 || off[3] == 0 || stretch0 == 0 || stretch1 == 0)
      failures++;
    $display("gated-off cycles: logic %0d state0 %0d state1 %0d toggle %0d; stretched %0d/%0d",
             off[0], off[1], off[2], off[3], stretch0, stretch1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
