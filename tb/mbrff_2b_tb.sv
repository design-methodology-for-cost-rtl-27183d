// Self-checking testbench for mbrff_2b. The testbench drives NRET and SHIFT with the
// 2-cycle timing (see mbr_mbff_tb) and checks: Q follows D in normal operation, the
// content is lost while the supply is off, Q = d^{l+1} after the 1st wakeup edge and
// Q = d^{l+2} after the 2nd. Power-down sequences are also run with the saved pair
// chosen to cover all four combinations of two bits.
module mbrff_2b_tb;
  logic clk = 1'b0, vvdd_ok = 1'b1, nret = 1'b1, shift = 1'b0;
  logic d, q;
  int checks = 0, failures = 0, wakeups = 0;

  mbrff_2b dut (.clk(clk), .vvdd_ok(vvdd_ok), .nret(nret), .shift(shift), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b exp %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic a1, a2, p;
    d = 1'b0;
    for (int it = 0; it < 64; it++) begin
      repeat (2) begin
        @(negedge clk); d = 1'($urandom); p = d;
        @(posedge clk); #1 chk(q, p, "run");
      end
      @(negedge clk); d = it[0]; a1 = d;
      @(posedge clk); shift = 1'b1;
      @(negedge clk); shift = 1'b0; d = it[1]; a2 = d;
      @(posedge clk);
      @(negedge clk); nret = 1'b0; d = 1'($urandom);
      @(negedge clk); vvdd_ok = 1'b0;
      repeat (2) begin
        @(negedge clk); d = 1'($urandom);
        chk(q, 1'b1, "lost");
      end
      @(negedge clk); vvdd_ok = 1'b1; d = 1'($urandom);
      @(posedge clk); #1 chk(q, a1, "wakeup edge 1");
      @(negedge clk); shift = 1'b1; d = 1'($urandom);
      @(posedge clk); shift = 1'b0;
      #1 chk(q, a2, "wakeup edge 2");
      wakeups++;
      @(negedge clk); nret = 1'b1;
    end
    checks++;
    if (wakeups == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
