// tero_cell: behavioural model of a transition-effect ring oscillator cell (not
// synthesizable logic).
//
// The real cell is a loop of two NAND gates, both driven by ctrl, and two chains of
// buffers: an even number of inverting gates. While ctrl is low both NAND outputs are 1
// and the loop rests. On each rising edge of ctrl two events start to circulate; they
// travel at slightly different speeds and the loop oscillates until the faster one
// catches the slower one, after which it is stable again. The number of oscillations is
// the random variable of the generator. This model draws it from a Gaussian with mean
// MEAN_OSC and standard deviation SIGMA_OSC, then produces that many full periods of
// OSC_PERIOD_PS on out (or fewer if ctrl falls first) and leaves out at 1.
//
// Interface: ctrl (restart), out (to the T flip-flop). Timing in picoseconds.
// The distribution and its default numbers are this model's own; the document gives
// none for the cell.
module tero_cell #(
  parameter real OSC_PERIOD_PS = 2000.0,
  parameter real MEAN_OSC      = 100.0,
  parameter real SIGMA_OSC     = 5.0
) (
  input  logic ctrl,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::gauss;

  int n_osc  = 0;
  int n_done = 0;

  initial out = 1'b1;

  always begin
    wait (!ctrl);
    out = 1'b1;
    @(posedge ctrl);
    n_osc = int'(MEAN_OSC + SIGMA_OSC * gauss());
    if (n_osc < 0) n_osc = 0;
    n_done = 0;
    while (ctrl && n_done < n_osc) begin
      #(OSC_PERIOD_PS / 2.0);
      out = 1'b0;
      #(OSC_PERIOD_PS / 2.0);
      out = 1'b1;
      n_done++;
    end
  end

endmodule
