// tero_trng: digital part of the transition-effect ring-oscillator TRNG (TERO-TRNG).
//
// A conventional ring oscillator clocks a 7-bit counter whose most significant bit is
// the control signal ctrl: it restarts the TERO cell once per 128 oscillator periods and
// sets the bit rate. While ctrl is high the TERO cell oscillates a random number of times
// before the two circulating events collide; a T flip-flop (1-bit counter) counts those
// oscillations, and on the falling edge of ctrl the output flip-flop (drawn with an
// inverted clock input) takes the parity. While ctrl is low the T flip-flop is held in
// reset, so the next count starts from zero.
//
// Interface: ro_clk (ring oscillator), tero_osc (TERO cell output), rst_n (asynchronous,
// active low, resets the 7-bit counter and both flip-flops), ctrl (to the TERO
// cell), noise, clk_o (= ctrl). Timing: one bit per 128 ro_clk periods; noise changes on
// the falling edge of clk_o, so a receiver samples it on the rising edge.
// The reset polarity of the T flip-flop (reset while ctrl is low) and taking ctrl from the
// counter's top bit are this design's choices.
module tero_trng #(
  parameter int unsigned CNT_BITS = 7
) (
  input  logic ro_clk,
  input  logic tero_osc,
  input  logic rst_n,
  output logic ctrl,
  output logic noise,
  output logic clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [CNT_BITS-1:0] cnt;
  logic                tff;
  logic                tff_rst_n;

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign ctrl  = cnt[CNT_BITS-1];
  assign clk_o = ctrl;

  // The T flip-flop is cleared while ctrl is low, and by the global reset.
  assign tff_rst_n = ctrl & rst_n;

  always_ff @(posedge tero_osc or negedge tff_rst_n) begin
    if (!tff_rst_n) tff <= 1'b0;
    else       tff <= ~tff;
  end

  always_ff @(negedge ctrl or negedge rst_n) begin
    if (!rst_n) noise <= 1'b0;
    else        noise <= tff;
  end

endmodule
