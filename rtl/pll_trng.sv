// pll_trng: digital part of the coherent-sampling TRNG built on two PLLs (PLL-TRNG).
//
// Two PLLs fed by the same ring oscillator give clk_jit and clk_ref with
// f_jit = f_ref * KM/KD (KM, KD coprime). Sampled on the rising edges of clk_ref, the
// jittery clock is seen at KD phases spread uniformly over its period, Delta = T_jit/KD
// apart, and the KD samples of one period must be XORed into one output bit. Here a
// D flip-flop with an XOR in front accumulates the samples (acc <= acc ^ clk_jit on every
// clk_ref edge) and a counter 0..KD-1 on clk_ref clocks the output flip-flop, which takes
// the accumulator once every KD samples. As drawn, the accumulator is never cleared, so
// consecutive output bits differ by the XOR of the last KD samples.
//
// Interface: clk_jit, clk_ref (PLL outputs), rst_n (asynchronous, active low),
// noise, clk_o (counter output). Timing: R = f_ref/KD bits per second; noise changes just
// after the rising edge of clk_o. KD = 1377 is the Spartan 6 configuration.
module pll_trng #(
  parameter int unsigned KD    = trng_pkg::PLL_KD_SPARTAN6,
  parameter int unsigned WIDTH = $clog2(KD)
) (
  input  logic clk_jit,
  input  logic clk_ref,
  input  logic rst_n,
  output logic noise,
  output logic clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic acc;
  logic cnt_clk;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) acc <= 1'b0;
    else        acc <= acc ^ clk_jit;
  end

  freq_divider #(.K(KD), .WIDTH(WIDTH)) u_cnt (
    .clk_in (clk_ref),
    .rst_n  (rst_n),
    .clk_out(cnt_clk)
  );

  always_ff @(posedge cnt_clk or negedge rst_n) begin
    if (!rst_n) noise <= 1'b0;
    else        noise <= acc;
  end

  assign clk_o = cnt_clk;

endmodule
