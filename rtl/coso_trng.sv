// coso_trng: digital part of the coherent-sampling ring-oscillator TRNG (COSO-TRNG).
//
// Two ring oscillators with the same number of elements and the same placement give
// clocks s1 and s2 whose periods differ by a small Delta_T. A D flip-flop samples s1 on
// the rising edges of s2; its output s3 is the beat signal, whose period is about
// T^2/Delta_T periods of s2 and varies randomly with the jitter. A 1-bit counter (a T
// flip-flop) counts the s2 periods of each beat period and is reset by the beat; the
// parity it holds when the beat rises is the random bit, captured in the output flip-flop.
//
// Everything runs in the s2 domain: the beat's rising edge is detected with one extra
// flip-flop, and in that cycle the parity is captured and the counter restarted. This
// makes the reset of the T flip-flop synchronous, which is this design's choice.
//
// Interface: s1, s2 (oscillator outputs), rst_n (asynchronous, active low), noise,
// clk_o (the registered beat signal).
// Timing: noise changes on the s2 edge on which clk_o rises, one bit per beat period;
// a receiver samples it on the falling edge of clk_o.
module coso_trng (
  input  logic s1,
  input  logic s2,
  input  logic rst_n,
  output logic noise,
  output logic clk_o
);
  timeunit 1ps;
  timeprecision 1fs;

  logic s3, s3_q, tff;

  always_ff @(posedge s2 or negedge rst_n) begin
    if (!rst_n) begin
      s3    <= 1'b0;
      s3_q  <= 1'b0;
      tff   <= 1'b0;
      noise <= 1'b0;
    end else begin
      s3   <= s1;
      s3_q <= s3;
      if (s3 && !s3_q) begin
        noise <= tff;
        tff   <= 1'b0;
      end else begin
        tff <= ~tff;
      end
    end
  end

  assign clk_o = s3_q;

endmodule
