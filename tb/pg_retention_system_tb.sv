// Self-checking testbench for pg_retention_system (W = 2).
//
// A reference model of the nine registers, written from the dependency graph, advances
// on every rising edge while the domain is running or in the two power-down cycles,
// and stands still from then until the wakeup completes. The domain must match it in
// every running cycle; in particular, right after the 2nd wakeup edge it must hold the
// state of the 2nd power-down edge. The power switch is modelled here: the supply-good
// signal follows nsleep after a short delay. Inputs are random while running and held
// from the power-down request until ready returns. The testbench also checks that
// the supply really went away (unretained registers lose their value) and that ready
// comes back exactly two edges after the supply-on cycle.
module pg_retention_system_tb;
  import lp_pkg::*;
  localparam int W = 2;
  logic clk = 1'b0, rst_n = 1'b1, pd_req = 1'b0, wake_req = 1'b0, vvdd_ok;
  logic [W-1:0] in_a = '0, in_b = '0;
  logic c1 = 1'b0, c2 = 1'b0, c5 = 1'b0, c6 = 1'b0;
  logic nsleep, ready;
  ret_state_e pg_state;
  logic [8:0][W-1:0] f, r;
  int checks = 0, failures = 0, n_wake = 0, n_lost = 0, n_run = 0;

  pg_retention_system dut (
    .clk(clk), .rst_n(rst_n), .pd_req(pd_req), .wake_req(wake_req), .vvdd_ok(vvdd_ok),
    .in_a(in_a), .in_b(in_b), .c1(c1), .c2(c2), .c5(c5), .c6(c6),
    .nsleep(nsleep), .ready(ready), .pg_state(pg_state), .f(f));

  // power switch model
  assign #2 vvdd_ok = nsleep;

  always #5 clk = ~clk;

  // reference: f1..f9 = r[0]..r[8]
  always @(posedge clk) begin
    if (!rst_n) r <= '0;
    else if (pg_state inside {RS_RUN, RS_PD1, RS_PD2}) begin
      r[0] <= c1 ? in_a : r[0];
      r[1] <= c2 ? in_b : r[1];
      r[2] <= W'(r[0] + r[1]);
      r[3] <= ~r[2];
      r[4] <= c5 ? r[3] : r[4];
      r[5] <= c6 ? W'(r[3] + 1) : r[5];
      r[6] <= ~r[4];
      r[7] <= W'(r[5] + 1);
      r[8] <= W'(r[2] + 1);
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t_on;
    bit holding;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    holding = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      pd_req = 1'b0; wake_req = 1'b0;
      if (ready) begin
        n_run++;
        checks++;
        if (f !== r) begin
          failures++;
          $display("FAIL cycle %0d: f=%h ref=%h", cyc, f, r);
        end
        holding = 0;
      end
      if (pg_state == RS_SLEEP) begin
        #3;   // supply-good follows nsleep after the switch delay
        checks++;
        if (f[2] !== '1 || f[6] !== '1 || f[7] !== '1) begin
          failures++;
          $display("FAIL supply off but unretained registers kept their value");
        end else n_lost++;
        wake_req = ($urandom_range(0, 3) == 0);
      end
      if (pg_state == RS_PWRON) t_on = cyc;
      if (pg_state == RS_WK1) begin
        @(posedge clk); #1;
        checks++;
        if (!ready || cyc + 1 - t_on != 2) begin
          failures++;
          $display("FAIL wakeup took %0d cycles", cyc + 1 - t_on);
        end
        checks++;
        if (f !== r) begin
          failures++;
          $display("FAIL state after wakeup: f=%h ref=%h", f, r);
        end
        n_wake++;
        continue;
      end
      if (ready && !holding) begin
        in_a = W'($urandom); in_b = W'($urandom);
        {c1, c2, c5, c6} = 4'($urandom);
        if ($urandom_range(0, 19) == 0) begin
          pd_req = 1'b1;
          holding = 1;
        end
      end
    end
    checks++;
    if (n_wake < 5 || n_lost == 0) failures++;
    $display("wakeups %0d, sleep cycles with lost state %0d, running cycles %0d", n_wake, n_lost, n_run);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
