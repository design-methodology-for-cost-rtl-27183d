// Self-checking testbench for cd_state, both tree types. Reference: en is 1 when any D
// is away from the resting state (1 for a state-0 group, 0 for a state-1 group), and
// g = en | (en one cycle earlier); the delayed term is 1 right after reset.
module cd_state_tb;
  localparam int K = 8;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [K-1:0] d0, d1;
  logic g0, g1;
  logic en0_prev, en1_prev;
  int checks = 0, failures = 0;
  int n_stretch0 = 0, n_stretch1 = 0, n_off0 = 0, n_off1 = 0;

  cd_state #(.K(K), .STATE1(1'b0)) dut0 (.clk(clk), .rst_n(rst_n), .d(d0), .g(g0));
  cd_state #(.K(K), .STATE1(1'b1)) dut1 (.clk(clk), .rst_n(rst_n), .d(d1), .g(g1));

  always #5 clk = ~clk;

  // reference of the stretcher's delay flip-flop (1 during reset)
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin en0_prev <= 1'b1; en1_prev <= 1'b1; end
    else begin en0_prev <= |d0; en1_prev <= ~&d1; end
  end

  function automatic logic [K-1:0] sparse(input int p);  // each bit 1 with chance 1/p
    logic [K-1:0] v;
    for (int i = 0; i < K; i++) v[i] = ($urandom_range(1, p) == 1);
    return v;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic en0, en1;
    d0 = '0; d1 = '1;
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      d0 = (t % 50 < 25) ? sparse(24) : '0;
      d1 = (t % 50 < 25) ? ~sparse(24) : '1;
      #1;
      en0 = |d0;
      en1 = ~&d1;
      checks += 2;
      if (g0 !== (en0 | en0_prev)) begin failures++; $display("FAIL g0 t=%0d g=%b en=%b prev=%b d=%b rst=%b time=%0t", t, g0, en0, en0_prev, d0, rst_n, $time); end
      if (g1 !== (en1 | en1_prev)) begin failures++; $display("FAIL g1 t=%0d", t); end
      if (!en0 && en0_prev) n_stretch0++;
      if (!en1 && en1_prev) n_stretch1++;
      if (!g0) n_off0++;
      if (!g1) n_off1++;
    end
    checks++;
    if (n_stretch0 == 0 || n_stretch1 == 0 || n_off0 == 0 || n_off1 == 0) failures++;
    $display("stretched %0d/%0d gated-off %0d/%0d", n_stretch0, n_stretch1, n_off0, n_off1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
