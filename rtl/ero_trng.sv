// ero_trng: digital part of the elementary ring-oscillator TRNG (ERO-TRNG).
//
// Two identical ring oscillators feed this block. The clock of the second one (ro2) is
// divided by K in a 17-bit synchronous counter; on every rising edge of the divided
// clock a D flip-flop samples the first oscillator (ro1). Between two samples ro1
// accumulates K periods' worth of jitter of ro2, which is the source of randomness; the
// entropy bound of the generator grows with K. Using two identical rings cancels most of
// the global (manipulable) noise sources.
//
// Interface: ro1, ro2 (oscillator outputs), rst_n (asynchronous, active low, resets only
// the divider), noise (one bit per K periods of ro2), clk_o (the divided clock).
// Timing: noise changes just after each rising edge of clk_o and is stable for a full
// clk_o period; a receiver samples it on the falling edge of clk_o. Bit rate f_ro2/K.
// The structure, K = 80000 and the 17-bit counter follow the Spartan 6 implementation;
// the reset and the output timing convention are this design's choices.
module ero_trng #(
  parameter int unsigned K     = trng_pkg::ERO_K_SPARTAN6,
  parameter int unsigned WIDTH = 17
) (
  input  logic ro1,
  input  logic ro2,
  input  logic rst_n,
  output logic noise,
  output logic clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic div_clk;

  freq_divider #(.K(K), .WIDTH(WIDTH)) u_div (
    .clk_in (ro2),
    .rst_n  (rst_n),
    .clk_out(div_clk)
  );

  // The sampling flip-flop has no reset: its first value is already a random sample.
  always_ff @(posedge div_clk) noise <= ro1;

  assign clk_o = div_clk;

endmodule
