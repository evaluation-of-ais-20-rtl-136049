// trng_top_monitor: testbench-only observer of the six generator outputs of trng_top.
//
// For every generator g it records, while out_en[g] is high, the rising edges of the
// strobe, the strobe period, and the noise bit taken on the strobe edge opposite to the one
// on which that generator updates noise. It compares the mean strobe period with
// EXP_PERIOD_PS[g] (relative tolerance TOL[g]) and requires both bit values to appear.
// While out_en[g] is low it checks that both pins carry static_in. Results are read by
// the enclosing testbench through the functions below.
module trng_top_monitor #(
  parameter real EXP_PERIOD_PS [6] = '{240000.0, 1849000.0, 351000.0, 2834000.0, 1600000.0, 6493.5},
  parameter real TOL [6]           = '{0.01, 0.3, 0.01, 0.01, 0.01, 0.01}
) (
  input logic                static_in,
  input logic [5:0]          out_en,
  input trng_pkg::trng_out_t pins [6]
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  int unsigned rises [6];
  int unsigned ones  [6];
  int unsigned zeros [6];
  realtime     first_rise [6];
  realtime     last_rise  [6];
  int unsigned blocked_ok, blocked_bad;

  initial begin
    foreach (rises[g]) begin
      rises[g] = 0; ones[g] = 0; zeros[g] = 0;
    end
    blocked_ok = 0; blocked_bad = 0;
  end

  for (genvar g = 0; g < 6; g++) begin : g_mon
    // Strobe period, measured on rising edges.
    always @(posedge pins[g].clk) if (out_en[g]) begin
      if (rises[g] == 0) first_rise[g] = $realtime;
      last_rise[g] = $realtime;
      rises[g]++;
      if (g == GEN_TERO) begin
        if (pins[g].noise) ones[g]++; else zeros[g]++;
      end
    end
    // All generators but TERO update noise after the rising strobe edge.
    always @(negedge pins[g].clk) if (out_en[g] && g != GEN_TERO && rises[g] > 0) begin
      if (pins[g].noise) ones[g]++; else zeros[g]++;
    end
  end

  // Blocking: with out_en low the pins follow static_in.
  always @(static_in or out_en) begin
    #1;
    for (int g = 0; g < 6; g++) if (!out_en[g]) begin
      if (pins[g].noise == static_in && pins[g].clk == static_in) blocked_ok++;
      else blocked_bad++;
    end
  end

  function automatic real mean_period(int g);
    if (rises[g] < 2) return 0.0;
    return (last_rise[g] - first_rise[g]) / real'(rises[g] - 1);
  endfunction

  function automatic bit period_ok(int g);
    real p;
    p = mean_period(g);
    return p > EXP_PERIOD_PS[g] * (1.0 - TOL[g]) && p < EXP_PERIOD_PS[g] * (1.0 + TOL[g]);
  endfunction

  function automatic void clear();
    foreach (rises[g]) begin
      rises[g] = 0; ones[g] = 0; zeros[g] = 0;
    end
  endfunction

endmodule
