// tb_output_mux: exhaustive check of the output multiplexer over all 16 input combinations.
module tb_output_mux;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic en, static_in;
  trng_pkg::trng_out_t gen, pins;

  output_mux dut (.en(en), .static_in(static_in), .gen(gen), .pins(pins));

  initial begin
    for (int v = 0; v < 16; v++) begin
      {en, static_in, gen.noise, gen.clk} = 4'(v);
      #10;
      checks++;
      if (en ? (pins.noise != gen.noise || pins.clk != gen.clk)
             : (pins.noise != static_in || pins.clk != static_in)) begin
        failures++;
        $display("FAIL combination %0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
