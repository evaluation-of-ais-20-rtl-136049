// muro_trng: digital part of the multi-ring-oscillator TRNG (MURO-TRNG).
//
// M ring oscillators with uniformly distributed phases are each sampled in a D
// flip-flop on the reference clock; the M samples are XORed and the XOR is sampled
// again in the output flip-flop on the same clock. The reference clock is an extra ring
// oscillator (ro_r) divided by K, so that every ring accumulates enough jitter between
// two samples. The first rank of flip-flops is the modification that relieves the
// M-input XOR from following M fast clocks.
//
// Interface: ro (the M oscillator outputs), ro_r (reference oscillator), rst_n
// (asynchronous, active low, resets only the divider), noise, clk_o (= clk_ref).
// Timing: one bit per clk_ref period, two clk_ref cycles after the rings are sampled;
// noise changes just after the rising edge of clk_o.
// The structure follows the generator as published; M and K are not given for it and
// were chosen here (see the parameter comments).
module muro_trng #(
  // Number of rings: 114, from the original multi-ring proposal; it also matches the
  // 131 registers reported (114 + 1 output flip-flop + a 16-bit counter).
  parameter int unsigned M     = 114,
  // Division factor: ~300 MHz reference ring / 2.57 Mbit/s reported bit rate.
  parameter int unsigned K     = 117,
  parameter int unsigned WIDTH = 16
) (
  input  logic [M-1:0] ro,
  input  logic         ro_r,
  input  logic         rst_n,
  output logic         noise,
  output logic         clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic         clk_ref;
  logic [M-1:0] samp;

  freq_divider #(.K(K), .WIDTH(WIDTH)) u_div (
    .clk_in (ro_r),
    .rst_n  (rst_n),
    .clk_out(clk_ref)
  );

  // No reset: the first outputs are already samples of the rings.
  always_ff @(posedge clk_ref) begin
    samp  <= ro;
    noise <= ^samp;
  end

  assign clk_o = clk_ref;

endmodule
