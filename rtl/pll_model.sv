// pll_model: behavioural model of an FPGA PLL (not synthesizable logic).
//
// The real part is a vendor PLL macro; only its function matters here: an output clock
// at f_in * KM / KD. The model measures the period of clk_in between two rising edges and,
// once it has a measurement, generates clk_out with the period T_in * KD / KM, each half
// period disturbed by Gaussian jitter of standard deviation JITTER_PS/sqrt(2). locked rises
// with the first output edge. Tracking of a drifting input is limited to re-measuring the
// period on every input edge. The defaults are PLL1 of the Spartan 6 configuration.
//
// Interface: clk_in, clk_out, locked. Timing in picoseconds.
module pll_model #(
  parameter int unsigned KM        = 37,
  parameter int unsigned KD        = 81,
  parameter real         JITTER_PS = 2.0
) (
  input  logic clk_in,
  output logic clk_out,
  output logic locked
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::gauss;

  realtime t_last  = 0.0;
  real     t_in    = 0.0;
  bit      have_last = 1'b0;

  initial begin
    clk_out = 1'b0;
    locked  = 1'b0;
  end

  // Input period measurement.
  always @(posedge clk_in) begin
    if (have_last) t_in = $realtime - t_last;
    t_last    = $realtime;
    have_last = 1'b1;
  end

  // Output clock generation, once a period has been measured.
  always begin
    wait (t_in > 0.0);
    locked = 1'b1;
    #(t_in * real'(KD) / real'(KM) / 2.0 + JITTER_PS / 1.4142135623730951 * gauss());
    clk_out = ~clk_out;
  end

endmodule
