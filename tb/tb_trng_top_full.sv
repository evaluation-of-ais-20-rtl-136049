// tb_trng_top_full: the six generators at their default sizes (ERO K = 80000, MURO with
// 114 rings and K = 117, PLL with KD = 1377, STR with 255 stages and 128 events), run for
// 600 us so that even the slowest generator, the ERO-TRNG at one bit per 240 us, completes
// two bits. Checks every strobe period against the value expected from the oscillator
// periods and division factors, that every generator produced bits, and that blocking the
// outputs switches the pins to static_in.
module tb_trng_top_full;
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  localparam real T_REF = 5000.0 * 7.0 / 17.0;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, static_in = 1'b0;
  logic [5:0] out_en = '1;
  trng_out_t pins [6];

  trng_top dut (.rst_n(rst_n), .static_in(static_in), .out_en(out_en), .pins(pins));

  trng_top_monitor #(
    .EXP_PERIOD_PS('{3000.0 * ERO_K_SPARTAN6, 6920.0 * 6946.0 / 26.0, 3000.0 * 117,
                     T_REF * PLL_KD_SPARTAN6, 12500.0 * 128, 6493.5}),
    .TOL('{0.01, 0.3, 0.01, 0.01, 0.01, 0.01})
  ) mon (.static_in(static_in), .out_en(out_en), .pins(pins));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  string names [6] = '{"ERO", "COSO", "MURO", "PLL", "TERO", "STR"};
  int unsigned min_bits [6] = '{2, 100, 1000, 100, 100, 10000};

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #1;
    mon.clear();
    #600000000;
    for (int g = 0; g < 6; g++) begin
      $display("%s: %0d strobes, mean period %f ps, %0d ones, %0d zeros", names[g],
               mon.rises[g], mon.mean_period(g), mon.ones[g], mon.zeros[g]);
      check(mon.rises[g] >= min_bits[g], {names[g], ": bits produced"});
      check(mon.period_ok(g), {names[g], ": strobe period"});
      if (g != GEN_ERO) check(mon.ones[g] > 0 && mon.zeros[g] > 0, {names[g], ": both bit values"});
    end
    out_en = '0;
    repeat (10) begin
      #20000 static_in = ~static_in;
    end
    check(mon.blocked_bad == 0 && mon.blocked_ok > 0, "blocked pins follow static_in");
    check(dut.pll1_locked && dut.pll2_locked, "PLLs locked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #700000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
