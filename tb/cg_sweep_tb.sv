// Workload testbench: flip-flop groups of size k = 2, 4, ..., 16 with independent random
// inputs, for both clock disable types.
//   Toggling gating: each flip-flop toggles with probability 0.05 per cycle; the
//   clock is off when no flip-flop toggles, expected fraction 0.95^k.
//   State-0 gating: each flip-flop's next value is 1 with probability 0.05 per cycle,
//   else 0; the clock is off when D was all zero this cycle and the previous one
//   (stretcher), expected fraction 0.95^(2k).
// For every k the measured fraction of gated cycles must lie within 0.03 of the
// expected one, and the group output must always equal a plain reference register.
module cg_sweep_tb;
  import lp_pkg::*;
  localparam int KMAX = 16;
  localparam int CYCLES = 20000;
  logic clk = 1'b0, rst_n = 1'b1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [KMAX-1:0] dt [8], qt [8], ds [8], qs [8], rt [8], rs [8];
  logic gt [8], gs [8];
  int offt [8], offs [8];

  for (genvar j = 0; j < 8; j++) begin : g_k
    localparam int K = 2 * (j + 1);
    cg_group #(.K(K), .MODE(CG_TOGGLE)) u_t (
      .clk(clk), .rst_n(rst_n), .d(dt[j][K-1:0]), .le(1'b1), .q(qt[j][K-1:0]), .g(gt[j]));
    cg_group #(.K(K), .MODE(CG_STATE0)) u_s (
      .clk(clk), .rst_n(rst_n), .d(ds[j][K-1:0]), .le(1'b1), .q(qs[j][K-1:0]), .g(gs[j]));
    if (K < KMAX) begin : g_pad
      assign qt[j][KMAX-1:K] = '0;
      assign qs[j][KMAX-1:K] = '0;
    end
  end

  always @(posedge clk or negedge rst_n) begin
    for (int j = 0; j < 8; j++) begin
      if (!rst_n) begin rt[j] <= '0; rs[j] <= '0; end
      else begin rt[j] <= dt[j]; rs[j] <= ds[j]; end
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
    real et, es, mt, ms;
    for (int j = 0; j < 8; j++) begin dt[j] = '0; ds[j] = '0; offt[j] = 0; offs[j] = 0; end
    #1 rst_n = 1'b0;
    #11 rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(negedge clk);
      for (int j = 0; j < 8; j++) begin
        checks += 2;
        if (qt[j] !== rt[j]) begin failures++; $display("FAIL toggle k=%0d", 2*(j+1)); end
        if (qs[j] !== rs[j]) begin failures++; $display("FAIL state0 k=%0d", 2*(j+1)); end
        for (int i = 0; i < 2 * (j + 1); i++) begin
          dt[j][i] = qt[j][i] ^ ($urandom_range(0, 99) < 5);
          ds[j][i] = ($urandom_range(0, 99) < 5);
        end
      end
      #1;
      if (c > 0)
        for (int j = 0; j < 8; j++) begin
          if (!gt[j]) offt[j]++;
          if (!gs[j]) offs[j]++;
        end
    end
    for (int j = 0; j < 8; j++) begin
      et = 0.95 ** (2 * (j + 1));
      es = 0.95 ** (4 * (j + 1));
      mt = real'(offt[j]) / real'(CYCLES - 1);
      ms = real'(offs[j]) / real'(CYCLES - 1);
      $display("k=%2d  toggling: gated %.3f (expected %.3f)   state-0: gated %.3f (expected %.3f)",
               2 * (j + 1), mt, et, ms, es);
      checks += 2;
      if (mt < et - 0.03 || mt > et + 0.03) failures++;
      if (ms < es - 0.03 || ms > es + 0.03) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
