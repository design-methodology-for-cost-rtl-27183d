// Self-checking testbench for icg: a rising clock edge must reach gclk exactly when en
// was high at the end of the preceding low phase, and changes of en during the high
// phase must not reach gclk.
module icg_tb;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int n_pass = 0, n_block = 0;

  icg dut (.clk(clk), .en(en), .gclk(gclk));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en_at_rise;
    repeat (400) begin
      // low phase: set en somewhere in it
      #2 en = 1'($urandom_range(0, 1));
      #3 en_at_rise = en;
      clk = 1'b1;                 // rising edge
      #1 check(gclk, en_at_rise, "gclk after rising edge");
      if (en_at_rise) n_pass++; else n_block++;
      #1 en = ~en;                // glitch attempt during high phase
      #1 check(gclk, en_at_rise, "gclk held during high phase");
      #2 clk = 1'b0;
      #0 check(gclk, 1'b0, "gclk low while clk low");
    end
    checks++;
    if (n_pass == 0 || n_block == 0) failures++;
    $display("edges passed %0d blocked %0d", n_pass, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
