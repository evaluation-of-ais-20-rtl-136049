// str_trng: digital part of the self-timed-ring TRNG (STR-TRNG).
//
// Every stage output C1..CL of the self-timed ring is sampled in its own D flip-flop on
// the rising edge of the clock of an extra ring oscillator; the L samples are XORed and
// the result is sampled again in the output flip-flop on the same clock. With E events
// evenly spread in L stages (E, L coprime) the ring offers L equidistant phases, so the
// sampling clock always lands within Delta_phi = T*E/(2L) of some transition; the
// accumulated jitter then decides the XOR of the samples.
//
// Interface: clk (sampling oscillator), c (the L stage outputs), noise, clk_o (= clk).
// Timing: one bit per clk period, two clk cycles after the ring is sampled; noise
// changes just after the rising edge of clk_o.
// L = 255 is this design's reading of the 256 registers reported (255 samplers plus the
// output flip-flop); the document does not print L.
module str_trng #(
  parameter int unsigned L = 255
) (
  input  logic         clk,
  input  logic [L-1:0] c,
  output logic         noise,
  output logic         clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [L-1:0] samp;

  // No reset: the first outputs are already samples of the ring.
  always_ff @(posedge clk) begin
    samp  <= c;
    noise <= ^samp;
  end

  assign clk_o = clk;

endmodule
