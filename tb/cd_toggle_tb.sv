// Self-checking testbench for cd_toggle: g must be 1 exactly when some D differs from
// its Q, checked on random and on one-bit-difference vectors.
module cd_toggle_tb;
  localparam int K = 8;
  logic [K-1:0] d, q;
  logic g;
  int checks = 0, failures = 0;

  cd_toggle #(.K(K)) dut (.d(d), .q(q), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int t = 0; t < 600; t++) begin
      q = K'($urandom);
      if (t % 3 == 0)      d = q;                       // no toggle
      else if (t % 3 == 1) d = q ^ (K'(1) << (t % K));  // exactly one toggle
      else                 d = K'($urandom);
      #1;
      exp = 1'b0;
      for (int i = 0; i < K; i++) if (d[i] != q[i]) exp = 1'b1;
      checks++;
      if (g !== exp) begin
        failures++;
        $display("FAIL d=%b q=%b g=%b exp=%b", d, q, g, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
