// tb_trng_families: the six generators in the Cyclone V and the SmartFusion 2
// configurations, side by side for 410 us (one complete ERO bit at K = 135 000).
//   Cyclone V    : ERO N = 5, K = 135 000 (18-bit divider), 3 ps jitter;
//                  COSO N = 6, T = 3.17 ns, 2.5 ps jitter; PLL 31/29 and 23/18, KD = 667;
//                  TERO control ring 128 MHz; STR sampling ring 245 MHz.
//   SmartFusion 2: ERO N = 5, K = 20 000, 8 ps jitter; COSO N = 10, T = 5.4 ns, 8 ps;
//                  PLL 74/162 and 18/22, KD = 729; TERO 128 MHz; STR 188 MHz.
// COSO Delta_T and the TERO and STR ring frequencies are derived from the reported bit
// rates (beat period = T^2/Delta_T; TERO: 128 ring periods per bit; STR: one bit per
// sampling period). MURO, for which no per-family size is reported, runs with 8 rings
// to keep the run short. Checks every strobe period and that every
// generator produced bits with both values.
module tb_trng_families;
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  int checks = 0, failures = 0;
  logic rst_n = 1'b1, static_in = 1'b0;
  logic [5:0] out_en = '1;
  trng_out_t pins_cv [6];
  trng_out_t pins_sf [6];

  trng_top #(
    .ERO_K(ERO_K_CYCLONE5), .ERO_WIDTH(18), .ERO_N(5), .ERO_STAGE_PS(300.0), .ERO_JITTER_PS(3.0),
    .COSO_N(6), .COSO_T1_PS(3170.0), .COSO_DT_PS(14.5), .COSO_JITTER_PS(2.5),
    .PLL1_KM(31), .PLL1_KD(29), .PLL2_KM(23), .PLL2_KD(18), .PLL_KD(PLL_KD_CYCLONE5),
    .TERO_RO_STAGE_PS(781.25), .STR_RO_STAGE_PS(157.0), .MURO_M(8)
  ) dut_cv (.rst_n(rst_n), .static_in(static_in), .out_en(out_en), .pins(pins_cv));

  trng_top #(
    .ERO_K(ERO_K_SMARTF2), .ERO_N(5), .ERO_STAGE_PS(300.0), .ERO_JITTER_PS(8.0),
    .COSO_N(10), .COSO_T1_PS(5400.0), .COSO_DT_PS(9.6), .COSO_JITTER_PS(8.0),
    .PLL1_KM(74), .PLL1_KD(162), .PLL2_KM(18), .PLL2_KD(22), .PLL_KD(PLL_KD_SMARTF2),
    .TERO_RO_STAGE_PS(781.25), .STR_RO_STAGE_PS(204.6), .MURO_M(8)
  ) dut_sf (.rst_n(rst_n), .static_in(static_in), .out_en(out_en), .pins(pins_sf));

  trng_top_monitor #(
    .EXP_PERIOD_PS('{3000.0 * ERO_K_CYCLONE5, 3170.0 * 3184.5 / 14.5, 3000.0 * 117,
                     5000.0 * 18.0 / 23.0 * PLL_KD_CYCLONE5, 7812.5 * 128, 2.0 * 13 * 157.0}),
    .TOL('{0.01, 0.3, 0.01, 0.01, 0.01, 0.01})
  ) mon_cv (.static_in(static_in), .out_en(out_en), .pins(pins_cv));

  trng_top_monitor #(
    .EXP_PERIOD_PS('{3000.0 * ERO_K_SMARTF2, 5400.0 * 5409.6 / 9.6, 3000.0 * 117,
                     5000.0 * 22.0 / 18.0 * PLL_KD_SMARTF2, 7812.5 * 128, 2.0 * 13 * 204.6}),
    .TOL('{0.01, 0.3, 0.01, 0.01, 0.01, 0.01})
  ) mon_sf (.static_in(static_in), .out_en(out_en), .pins(pins_sf));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  string names [6] = '{"ERO", "COSO", "MURO", "PLL", "TERO", "STR"};

  initial begin
    #100 rst_n = 1'b0;
    #20000 rst_n = 1'b1;
    #1;
    mon_cv.clear();
    mon_sf.clear();
    #410000000;
    for (int g = 0; g < 6; g++) begin
      $display("Cyclone V     %s: %0d strobes, mean period %f ps, %0d ones, %0d zeros", names[g],
               mon_cv.rises[g], mon_cv.mean_period(g), mon_cv.ones[g], mon_cv.zeros[g]);
      $display("SmartFusion 2 %s: %0d strobes, mean period %f ps, %0d ones, %0d zeros", names[g],
               mon_sf.rises[g], mon_sf.mean_period(g), mon_sf.ones[g], mon_sf.zeros[g]);
      check(mon_cv.rises[g] >= 2, {"Cyclone V ", names[g], ": bits produced"});
      check(mon_sf.rises[g] >= 2, {"SmartFusion 2 ", names[g], ": bits produced"});
      check(mon_cv.period_ok(g), {"Cyclone V ", names[g], ": strobe period"});
      check(mon_sf.period_ok(g), {"SmartFusion 2 ", names[g], ": strobe period"});
      if (g != GEN_ERO) begin
        check(mon_cv.ones[g] > 0 && mon_cv.zeros[g] > 0, {"Cyclone V ", names[g], ": both bit values"});
        check(mon_sf.ones[g] > 0 && mon_sf.zeros[g] > 0, {"SmartFusion 2 ", names[g], ": both bit values"});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
