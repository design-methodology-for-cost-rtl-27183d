// Self-checking testbench for cg_group in all five modes. Each group is compared with
// a reference register that loads d on every rising edge (only while le is high for
// the logic-gated group); the gating must never change q. It also counts the cycles
// in which each gated group's clock was actually switched off.
module cg_group_tb;
  import lp_pkg::*;
  localparam int K = 8;
  logic clk = 1'b0, rst_n = 1'b1, le = 1'b0;
  logic [K-1:0] d_none, d_logic, d_s0, d_s1, d_tg;
  logic [K-1:0] q_none, q_logic, q_s0, q_s1, q_tg;
  logic [K-1:0] r_none, r_logic, r_s0, r_s1, r_tg;
  logic g_none, g_logic, g_s0, g_s1, g_tg;
  int checks = 0, failures = 0;
  int off_logic = 0, off_s0 = 0, off_s1 = 0, off_tg = 0;

  cg_group #(.K(K), .MODE(CG_NONE))                    u_none  (.clk, .rst_n, .d(d_none),  .le(1'b1), .q(q_none),  .g(g_none));
  cg_group #(.K(K), .MODE(CG_LOGIC))                   u_logic (.clk, .rst_n, .d(d_logic), .le(le),   .q(q_logic), .g(g_logic));
  cg_group #(.K(K), .MODE(CG_STATE0))                  u_s0    (.clk, .rst_n, .d(d_s0),    .le(1'b1), .q(q_s0),    .g(g_s0));
  cg_group #(.K(K), .MODE(CG_STATE1), .RESET_VAL('1))  u_s1    (.clk, .rst_n, .d(d_s1),    .le(1'b1), .q(q_s1),    .g(g_s1));
  cg_group #(.K(K), .MODE(CG_TOGGLE))                  u_tg    (.clk, .rst_n, .d(d_tg),    .le(1'b1), .q(q_tg),    .g(g_tg));

  always #5 clk = ~clk;

  function automatic logic [K-1:0] sparse(input int p);
    logic [K-1:0] v;
    for (int i = 0; i < K; i++) v[i] = ($urandom_range(1, p) == 1);
    return v;
  endfunction

  task automatic cmp(input logic [K-1:0] got, input logic [K-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: q=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_none <= '0; r_logic <= '0; r_s0 <= '0; r_s1 <= '1; r_tg <= '0;
    end else begin
      r_none <= d_none;
      if (le) r_logic <= d_logic;
      r_s0 <= d_s0;
      r_s1 <= d_s1;
      r_tg <= d_tg;
    end
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_none = '0; d_logic = '0; d_s0 = '0; d_s1 = '1; d_tg = '0;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      cmp(q_none,  r_none,  "none");
      cmp(q_logic, r_logic, "logic");
      cmp(q_s0,    r_s0,    "state0");
      cmp(q_s1,    r_s1,    "state1");
      cmp(q_tg,    r_tg,    "toggle");
      d_none  = K'($urandom);
      d_logic = K'($urandom);
      le      = ($urandom_range(0, 3) == 0);
      d_s0    = (t % 40 < 15) ? sparse(20) : '0;
      d_s1    = (t % 40 < 15) ? ~sparse(20) : '1;
      d_tg    = ($urandom_range(0, 9) == 0) ? K'($urandom) : q_tg;
      #1;
      if (!g_logic) off_logic++;
      if (!g_s0)    off_s0++;
      if (!g_s1)    off_s1++;
      if (!g_tg)    off_tg++;
    end
    checks++;
    if (off_logic == 0 || off_s0 == 0 || off_s1 == 0 || off_tg == 0) failures++;
    $display("gated-off cycles: logic %0d state0 %0d state1 %0d toggle %0d",
             off_logic, off_s0, off_s1, off_tg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
