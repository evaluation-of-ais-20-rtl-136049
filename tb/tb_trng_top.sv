// tb_trng_top: end-to-end run of all six generators at reduced sizes (ERO K = 64, MURO
// with 8 rings and K = 5, PLL counter 17, STR with 15 stages and 4 events; COSO and TERO at
// their defaults). Phase 1 lets every generator produce bits and checks each strobe
// period against the value worked out from the oscillator periods, and that both bit
// values occur. Phase 2 blocks every output with out_en low, toggles static_in and checks
// that the pins follow it while the generators keep running; then only every other output
// is blocked, to check that the enables are independent. Phase 3 re-enables them.
// Mechanism counters: sampled bits of each generator, COSO beats, TERO restarts with
// oscillations, PLL lock, and blocked-output checks; each must occur at least once.
module tb_trng_top;
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  localparam int unsigned ERO_K  = 64;
  localparam int unsigned MURO_K = 5;
  localparam int unsigned PLL_KD = 17;
  localparam real T_REF = 5000.0 * 7.0 / 17.0;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, static_in = 1'b0;
  logic [5:0] out_en = '1;
  trng_out_t pins [6];

  trng_top #(
    .ERO_K(ERO_K), .MURO_M(8), .MURO_K(MURO_K), .PLL_KD(PLL_KD), .STR_L(15), .STR_E(4)
  ) dut (.rst_n(rst_n), .static_in(static_in), .out_en(out_en), .pins(pins));

  trng_top_monitor #(
    .EXP_PERIOD_PS('{3000.0 * ERO_K, 6920.0 * 6946.0 / 26.0, 3000.0 * MURO_K,
                     T_REF * PLL_KD, 12500.0 * 128, 6493.5}),
    .TOL('{0.01, 0.3, 0.01, 0.01, 0.01, 0.01})
  ) mon (.static_in(static_in), .out_en(out_en), .pins(pins));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Mechanism counters taken inside the design.
  int unsigned coso_beats = 0, tero_restarts = 0, tero_osc_edges = 0, running_blocked = 0;
  always @(posedge dut.coso_s2) if (dut.u_coso.s3 && !dut.u_coso.s3_q) coso_beats++;
  always @(posedge dut.tero_ctrl) tero_restarts++;
  always @(posedge dut.tero_osc) tero_osc_edges++;
  always @(posedge dut.gen[GEN_STR].clk) if (out_en == 6'b0) running_blocked++;

  string names [6] = '{"ERO", "COSO", "MURO", "PLL", "TERO", "STR"};

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #1;
    mon.clear();
    // Phase 1: 40 us of generation.
    #40000000;
    for (int g = 0; g < 6; g++) begin
      $display("%s: %0d strobes, mean period %f ps, %0d ones, %0d zeros", names[g],
               mon.rises[g], mon.mean_period(g), mon.ones[g], mon.zeros[g]);
      check(mon.rises[g] >= 10, {names[g], ": bits produced"});
      check(mon.period_ok(g), {names[g], ": strobe period"});
      check(mon.ones[g] > 0 && mon.zeros[g] > 0, {names[g], ": both bit values"});
    end
    // Phase 2: outputs blocked, generators running.
    out_en = '0;
    repeat (20) begin
      #50000 static_in = ~static_in;
    end
    check(mon.blocked_bad == 0 && mon.blocked_ok > 0, "blocked pins follow static_in");
    check(running_blocked > 0, "generators keep running while blocked");
    // Phase 2b: every other output blocked; the enables are independent.
    mon.clear();
    out_en = 6'b101010;
    repeat (20) begin
      #50000 static_in = ~static_in;
    end
    check(mon.blocked_bad == 0, "blocked pins follow static_in with mixed enables");
    check(mon.rises[GEN_STR] > 100 && mon.rises[GEN_PLL] > 10, "enabled outputs run with mixed enables");
    check(mon.rises[GEN_ERO] == 0 && mon.rises[GEN_MURO] == 0, "blocked outputs carry no strobe");
    // Phase 3: enabled again.
    mon.clear();
    out_en = '1;
    #5000000;
    check(mon.rises[GEN_STR] > 100 && mon.rises[GEN_MURO] > 100, "outputs re-enabled");
    $display("mechanisms: coso beats %0d, tero restarts %0d with %0d oscillations, pll locked %0d, blocked checks %0d",
             coso_beats, tero_restarts, tero_osc_edges, dut.pll1_locked && dut.pll2_locked, mon.blocked_ok);
    check(coso_beats > 0, "COSO beat detected");
    check(tero_restarts > 0 && tero_osc_edges > 0, "TERO restarts and oscillates");
    check(dut.pll1_locked && dut.pll2_locked, "PLLs locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
