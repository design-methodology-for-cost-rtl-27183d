// Self-checking testbench for sbrff, used once as a 1st-phase and once as a 2nd-phase
// retention flip-flop. The testbench drives SAVE/RESTORE itself with the 2-phase
// timing (controls change on falling edges), powers the cells down, checks that the
// content is lost while off, and that the 1st-phase cell returns d^{l+1} at the 1st
// wakeup edge and the 2nd-phase cell d^{l+2} at the 2nd.
module sbrff_tb;
  logic clk = 1'b0, vvdd_ok = 1'b1;
  logic save1 = 1'b0, save2 = 1'b0, restore1 = 1'b0, restore2 = 1'b0;
  logic da, db, qa, qb;
  int checks = 0, failures = 0, restores = 0;

  sbrff ua (.clk(clk), .vvdd_ok(vvdd_ok), .save(save1), .restore(restore1), .d(da), .q(qa));
  sbrff ub (.clk(clk), .vvdd_ok(vvdd_ok), .save(save2), .restore(restore2), .d(db), .q(qb));

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
    logic ea, eb, pa, pb;
    da = 1'b0; db = 1'b0;
    for (int it = 0; it < 60; it++) begin
      // normal operation: q follows d
      repeat (3) begin
        @(negedge clk);
        da = 1'($urandom); db = 1'($urandom);
        pa = da; pb = db;
        @(posedge clk); #1;
        chk(qa, pa, "run a"); chk(qb, pb, "run b");
      end
      // power-down cycle 1
      @(negedge clk);
      save1 = 1'b1;
      da = 1'($urandom); db = 1'($urandom);
      @(posedge clk); #1 ea = qa;
      // power-down cycle 2
      @(negedge clk);
      save1 = 1'b0; save2 = 1'b1;
      da = 1'($urandom); db = 1'($urandom);
      @(posedge clk); #1 eb = qb;
      @(negedge clk);
      save2 = 1'b0;
      @(negedge clk);
      vvdd_ok = 1'b0;
      repeat (1 + it % 4) begin
        @(negedge clk);
        da = 1'($urandom); db = 1'($urandom);
        chk(qa, 1'b1, "lost a"); chk(qb, 1'b1, "lost b");
      end
      // wakeup cycle 1: supply back, restore the 1st-phase cell
      @(negedge clk);
      vvdd_ok = 1'b1; restore1 = 1'b1;
      da = 1'($urandom); db = 1'($urandom); pb = db;
      @(posedge clk); #1;
      chk(qa, ea, "1st-phase restore"); chk(qb, pb, "2nd-phase follows d in wakeup cycle 1");
      // wakeup cycle 2: restore the 2nd-phase cell
      @(negedge clk);
      restore1 = 1'b0; restore2 = 1'b1;
      da = 1'($urandom); db = 1'($urandom); pa = da;
      @(posedge clk); #1;
      chk(qa, pa, "1st-phase follows d in wakeup cycle 2"); chk(qb, eb, "2nd-phase restore");
      restores++;
      @(negedge clk);
      restore2 = 1'b0;
    end
    checks++;
    if (restores == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
