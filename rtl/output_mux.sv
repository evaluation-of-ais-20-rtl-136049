// output_mux: output multiplexer between a generator and its serial output pins.
//
// When en is high the generator's data stream and strobe go to the outputs; when en is
// low both outputs carry the static input instead. The generator keeps running either
// way, which is how its net power is measured: the same multiplexer with a static signal
// crossing the device is the empty reference design. Purely combinational.
//
// Interface: en, static_in, gen (noise and clk of the generator), pins (to the two output
// links). Driving both pins from static_in when blocked is this design's choice.
module output_mux (
  input  logic                en,
  input  logic                static_in,
  input  trng_pkg::trng_out_t gen,
  output trng_pkg::trng_out_t pins
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    if (en) pins = gen;
    else    pins = '{noise: static_in, clk: static_in};
  end

endmodule
