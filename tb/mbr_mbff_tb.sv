// Self-checking testbench for mbr_mbff at its default 2 bits and banked to 8 bits.
// The testbench drives NRET and SHIFT itself with the 2-cycle timing: a SHIFT pulse
// in the clock-high half after the 1st power-down edge, NRET low from the middle of
// the cycle after the 2nd power-down edge, a SHIFT pulse in the clock-low half before
// the 2nd wakeup edge. After power loss the cell must return d^{l+1} at the 1st
// wakeup edge and d^{l+2} at the 2nd, then follow D again.
module mbr_mbff_tb;
  logic clk = 1'b0, vvdd_ok = 1'b1, nret = 1'b1, shift = 1'b0;
  logic [1:0] d2, q2;
  logic [7:0] d8, q8;
  int checks = 0, failures = 0, wakeups = 0;

  mbr_mbff              u2 (.clk(clk), .vvdd_ok(vvdd_ok), .nret(nret), .shift(shift), .d(d2), .q(q2));
  mbr_mbff #(.WIDTH(8)) u8 (.clk(clk), .vvdd_ok(vvdd_ok), .nret(nret), .shift(shift), .d(d8), .q(q8));

  always #5 clk = ~clk;

  task automatic chk(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_d();
    d2 = 2'($urandom); d8 = 8'($urandom);
  endtask

  initial begin
    logic [1:0] a1, a2, p2;
    logic [7:0] b1, b2, p8;
    new_d();
    for (int it = 0; it < 60; it++) begin
      repeat (3) begin
        @(negedge clk); new_d(); p2 = d2; p8 = d8;
        @(posedge clk); #1 chk(8'(q2), 8'(p2), "run 2b"); chk(q8, p8, "run 8b");
      end
      // 1st power-down edge, SHIFT pulse in the following clock-high half
      @(negedge clk); new_d(); a1 = d2; b1 = d8;
      @(posedge clk); shift = 1'b1;
      @(negedge clk); shift = 1'b0; new_d(); a2 = d2; b2 = d8;
      // 2nd power-down edge, then NRET falls mid-cycle
      @(posedge clk);
      @(negedge clk); nret = 1'b0; new_d();
      @(negedge clk); vvdd_ok = 1'b0;
      repeat (2 + it % 3) begin
        @(negedge clk); new_d();
        chk(8'(q2), 8'h3, "lost 2b"); chk(q8, 8'hFF, "lost 8b");
      end
      @(negedge clk); vvdd_ok = 1'b1; new_d();
      // 1st wakeup edge
      @(posedge clk); #1 chk(8'(q2), 8'(a1), "wakeup edge 1, 2b"); chk(q8, b1, "wakeup edge 1, 8b");
      @(negedge clk); shift = 1'b1; new_d();
      // 2nd wakeup edge
      @(posedge clk); shift = 1'b0;
      #1 chk(8'(q2), 8'(a2), "wakeup edge 2, 2b"); chk(q8, b2, "wakeup edge 2, 8b");
      wakeups++;
      @(negedge clk); nret = 1'b1;
    end
    checks++;
    if (wakeups == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
