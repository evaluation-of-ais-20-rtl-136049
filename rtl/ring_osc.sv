// ring_osc: behavioural model of a ring oscillator (not synthesizable logic).
//
// The real part is a loop of one NAND gate and N-1 buffers placed and routed by hand;
// the NAND's second input is the enable, tied to '1' in every generator of this design.
// Such a loop cannot be expressed as clocked logic, so this model reproduces its
// behaviour: while en is high, out toggles with a half period of N*STAGE_DELAY_PS, and
// every half period is disturbed by independent Gaussian jitter so that the period
// jitter has the standard deviation JITTER_PS. While en is low the NAND output is 1,
// so out rests at 1. The first edge comes after a random phase.
//
// Interface: en (enable), out (clock). Timing in picoseconds.
// The default stage delay gives the ~3 ns period quoted for the elementary generator;
// the default jitter is the ~4 ps period jitter quoted for Spartan 6. Modelling the
// jitter as white Gaussian per half period is this model's own choice.
module ring_osc #(
  parameter int unsigned N              = 3,
  parameter real         STAGE_DELAY_PS = 500.0,
  parameter real         JITTER_PS      = 4.0
) (
  input  logic en,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::gauss;

  localparam real HALF_PS = real'(N) * STAGE_DELAY_PS;
  // Half-period jitter such that the sum of two halves has sigma JITTER_PS.
  localparam real HALF_SIGMA_PS = JITTER_PS / 1.4142135623730951;

  bit started = 1'b0;

  always begin
    if (!started) begin
      out = 1'b1;
      #(HALF_PS * (real'($urandom_range(1000, 0)) / 1000.0));
      started = 1'b1;
    end
    if (!en) begin
      out = 1'b1;
      wait (en);
    end
    #(HALF_PS + HALF_SIGMA_PS * gauss());
    out = en ? ~out : 1'b1;
  end

endmodule
