// End-to-end testbench of cgpg_top at its default parameters (32-bit clock-gated bank,
// 2-bit-wide power-gated example). Both halves run at once on the shared clock.
//
// Clock gating: the bank is compared every cycle with a plain 32-bit register; the
// data pattern makes each gating mechanism happen and the testbench counts: cycles
// with the logic, state-0, state-1 and toggling clocks off, and cycles in which the
// signal stretcher kept a state group's clock on after the group returned to rest.
// Power gating: a reference model of the nine registers is compared in every running
// cycle; the testbench counts power-down sequences, sleep cycles with lost state,
// wakeups that restored the full state in two edges. Any mechanism that never
// happened counts as a failure.
module cgpg_top_tb;
  import lp_pkg::*;
  localparam int N = 32, W = 2;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [N-1:0] cg_d, cg_q, cg_r;
  logic cg_le = 1'b0;
  logic [3:0] cg_g;
  logic pd_req = 1'b0, wake_req = 1'b0, vvdd_ok, nsleep, ready;
  logic [W-1:0] in_a = '0, in_b = '0;
  logic [3:0] cond = '0;
  ret_state_e pg_state;
  logic [8:0][W-1:0] f, r;
  int checks = 0, failures = 0;
  int off_logic = 0, off_s0 = 0, off_s1 = 0, off_tg = 0, stretch = 0;
  int n_pd = 0, n_lost = 0, n_wake = 0;

  cgpg_top dut (
    .clk(clk), .rst_n(rst_n),
    .cg_d(cg_d), .cg_le(cg_le), .cg_q(cg_q), .cg_g(cg_g),
    .pd_req(pd_req), .wake_req(wake_req), .pg_vvdd_ok(vvdd_ok),
    .pg_in_a(in_a), .pg_in_b(in_b), .pg_cond(cond),
    .pg_nsleep(nsleep), .pg_ready(ready), .pg_state(pg_state), .pg_f(f));

  assign #2 vvdd_ok = nsleep;   // power switch model
  always #5 clk = ~clk;

  // references
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) cg_r <= {4'h0, 8'h00, 8'hFF, 8'h00, 4'h0};
    else begin
      if (cg_le) cg_r[3:0] <= cg_d[3:0];
      cg_r[N-1:4] <= cg_d[N-1:4];
    end
  end

  always @(posedge clk) begin
    if (!rst_n) r <= '0;
    else if (pg_state inside {RS_RUN, RS_PD1, RS_PD2}) begin
      r[0] <= cond[0] ? in_a : r[0];
      r[1] <= cond[1] ? in_b : r[1];
      r[2] <= W'(r[0] + r[1]);
      r[3] <= ~r[2];
      r[4] <= cond[2] ? r[3] : r[4];
      r[5] <= cond[3] ? W'(r[3] + 1) : r[5];
      r[6] <= ~r[4];
      r[7] <= W'(r[5] + 1);
      r[8] <= W'(r[2] + 1);
    end
  end

  function automatic logic [7:0] sparse(input int p);
    logic [7:0] v;
    for (int i = 0; i < 8; i++) v[i] = ($urandom_range(1, p) == 1);
    return v;
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit holding, rest_prev;
    int t_on;
    cg_d = {4'h0, 8'h00, 8'hFF, 8'h00, 4'h0};
    holding = 0; rest_prev = 1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      // ---- clock-gated bank
      checks++;
      if (cg_q !== cg_r) begin
        failures++;
        $display("FAIL bank cycle %0d: q=%h exp=%h", cyc, cg_q, cg_r);
      end
      cg_le        = ($urandom_range(0, 3) == 0);
      cg_d[3:0]    = 4'($urandom);
      cg_d[11:4]   = (cyc % 30 < 10) ? sparse(16) : 8'h00;
      cg_d[19:12]  = (cyc % 30 < 10) ? ~sparse(16) : 8'hFF;
      cg_d[27:20]  = ($urandom_range(0, 7) == 0) ? 8'($urandom) : cg_q[27:20];
      cg_d[31:28]  = 4'($urandom);
      #1;
      if (!cg_g[0]) off_logic++;
      if (!cg_g[1]) off_s0++;
      if (!cg_g[2]) off_s1++;
      if (!cg_g[3]) off_tg++;
      if (cg_d[11:4] == 8'h00 && !rest_prev && cg_g[1]) stretch++;
      rest_prev = (cg_d[11:4] == 8'h00);
      // ---- power-gated domain
      pd_req = 1'b0; wake_req = 1'b0;
      if (ready) begin
        checks++;
        if (f !== r) begin
          failures++;
          $display("FAIL domain cycle %0d: f=%h ref=%h", cyc, f, r);
        end
        if (holding) n_wake++;
        holding = 0;
      end
      if (pg_state == RS_PD1) n_pd++;
      if (pg_state == RS_SLEEP) begin
        #2;
        checks++;
        if (f[2] !== '1 || f[6] !== '1 || f[7] !== '1) begin
          failures++;
          $display("FAIL supply off but unretained registers kept their value");
        end else n_lost++;
        wake_req = ($urandom_range(0, 3) == 0);
      end
      if (pg_state == RS_PWRON) t_on = cyc;
      if (pg_state == RS_WK1) begin
        checks++;
        if (cyc + 1 - t_on != 2) begin
          failures++;
          $display("FAIL wakeup latency");
        end
      end
      if (ready && !holding) begin
        in_a = W'($urandom); in_b = W'($urandom);
        cond = 4'($urandom);
        if ($urandom_range(0, 24) == 0) begin
          pd_req = 1'b1;
          holding = 1;
        end
      end
    end
    $display("bank: clock off logic %0d state0 %0d state1 %0d toggle %0d, stretched %0d",
             off_logic, off_s0, off_s1, off_tg, stretch);
    $display("domain: power-downs %0d, sleep cycles with lost state %0d, restored wakeups %0d",
             n_pd, n_lost, n_wake);
    checks++;
    if (off_logic == 0 || off_s0 == 0 || off_s1 == 0 || off_tg == 0 || stretch == 0 ||
        n_pd == 0 || n_lost == 0 || n_wake == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
