// Self-checking testbench for retention_ctrl. The testbench keeps its own copy of the
// power-down / wakeup sequence and checks the state every cycle and every control
// output twice per cycle (in the clock-high half and in the clock-low half) against
// the expected waveform: controls registered on the falling edge, SHIFT in the
// clock-high half after the 1st power-down edge and in the clock-low half before the
// 2nd wakeup edge. It also checks the two-cycle latencies: retention is closed two
// edges after the sequence starts, and ready returns two edges after the supply is
// back. Requests in the wrong state must be ignored.
module retention_ctrl_tb;
  import lp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, pd_req = 1'b0, wake_req = 1'b0;
  ret_ctrl_t ctrl;
  logic nsleep, ready;
  ret_state_e state;
  int checks = 0, failures = 0, n_seq = 0;

  retention_ctrl dut (.clk(clk), .rst_n(rst_n), .pd_req(pd_req), .wake_req(wake_req),
                      .ctrl(ctrl), .nsleep(nsleep), .state(state), .ready(ready));

  always #5 clk = ~clk;

  // expected control values while the previous falling edge saw state s
  function automatic logic [6:0] exp_ctrl(input int s);
    // {save1, save2, restore1, restore2, nret, nsleep, ready-unused}
    logic [6:0] v;
    v[6] = (s == 1);
    v[5] = (s == 2);
    v[4] = (s == 5);
    v[3] = (s == 6);
    v[2] = !(s == 3 || s == 4 || s == 5 || s == 6);
    v[1] = (s != 4);
    v[0] = 1'b0;
    return v;
  endfunction

  task automatic chk(input logic [6:0] got, input logic [6:0] exp, input string what);
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
    int s_exp, s_prev, sleep_len, t_pwron, t_ready;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    s_exp = 0; s_prev = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      // drive requests in the low half, sometimes in the wrong state
      @(negedge clk);
      #1;
      chk({ctrl.save1, ctrl.save2, ctrl.restore1, ctrl.restore2, ctrl.nret, nsleep, 1'b0},
          exp_ctrl(s_exp), "controls, low half");
      chk(7'(ctrl.shift), 7'(s_exp == 6), "shift, low half");
      chk(7'(ready), 7'(s_exp == 0), "ready");
      pd_req   = ($urandom_range(0, 9) == 0);
      wake_req = ($urandom_range(0, 5) == 0);
      @(posedge clk);
      s_prev = s_exp;
      case (s_exp)
        0: if (pd_req) s_exp = 1;
        1: s_exp = 2;
        2: s_exp = 3;
        3: s_exp = 4;
        4: if (wake_req) begin s_exp = 5; t_pwron = cyc; end
        5: s_exp = 6;
        6: begin s_exp = 0; n_seq++; end
        default: s_exp = 0;
      endcase
      #2;
      checks++;
      if (int'(state) != s_exp) begin
        failures++;
        $display("FAIL state %0d exp %0d at %0t", state, s_exp, $time);
      end
      chk({ctrl.save1, ctrl.save2, ctrl.restore1, ctrl.restore2, ctrl.nret, nsleep, 1'b0},
          exp_ctrl(s_prev), "controls, high half");
      chk(7'(ctrl.shift), 7'(s_prev == 1), "shift, high half");
      if (s_prev == 6 && s_exp == 0) begin
        // ready two edges after the supply came back
        checks++;
        if (cyc - t_pwron != 2) begin
          failures++;
          $display("FAIL wakeup latency %0d", cyc - t_pwron);
        end
      end
    end
    checks++;
    if (n_seq < 3) failures++;
    $display("complete power-down/wakeup sequences: %0d", n_seq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
