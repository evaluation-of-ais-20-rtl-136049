// freq_divider: synchronous divide-by-K counter producing a clock of period K input cycles.
//
// A WIDTH-bit counter counts 0..K-1 on the rising edge of clk_in. The registered output
// clk_out is high while the counter is below K/2, so it rises exactly once every K input
// cycles (the edge follows the input edge on which the counter wrapped to 0) with a
// duty cycle of floor(K/2)/K.
//
// Used as the divider by K of the elementary and multi-ring generators (a 17-bit
// counter for the elementary one) and as the 0..KD-1 counter of the PLL generator.
// The reset and the duty cycle are this design's choices.
module freq_divider #(
  parameter int unsigned K     = 80000,
  parameter int unsigned WIDTH = 17
) (
  input  logic clk_in,
  input  logic rst_n,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [WIDTH-1:0] cnt;
  logic             clk_q;

  localparam logic [WIDTH-1:0] LAST = WIDTH'(K - 1);
  localparam logic [WIDTH-1:0] HALF = WIDTH'(K / 2);

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= LAST;
      clk_q <= 1'b0;
    end else begin
      cnt   <= (cnt == LAST) ? '0 : cnt + 1'b1;
      clk_q <= (cnt == LAST) || (cnt + 1'b1 < HALF);
    end
  end

  assign clk_out = clk_q;

  initial begin
    assert (K >= 2) else $error("freq_divider: K must be at least 2");
    assert (K <= 2 ** WIDTH) else $error("freq_divider: K does not fit in WIDTH bits");
  end

endmodule
