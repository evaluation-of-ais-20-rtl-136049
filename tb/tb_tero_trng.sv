// tb_tero_trng: ro_clk is a clock; whenever ctrl rises the testbench plays the TERO cell,
// producing a random number n of pulses on tero_osc. On the falling edge of ctrl the output
// must be n mod 2. Also checks that ctrl has a period of 128 ro_clk cycles, half high.
module tb_tero_trng;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic ro_clk = 1'b0, tero_osc = 1'b1, rst_n = 1'b1;
  logic ctrl, noise, clk_o;

  tero_trng dut (.ro_clk(ro_clk), .tero_osc(tero_osc), .rst_n(rst_n), .ctrl(ctrl), .noise(noise), .clk_o(clk_o));

  always #500 ro_clk = ~ro_clk;

  int unsigned n_pulses = 0, bits = 0, ones = 0, cyc = 0, high_cyc = 0, periods = 0;
  logic prev = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at bit %0d (n=%0d noise=%0d t=%0t)", what, bits, n_pulses, noise, $realtime);
    end
  endtask

  // Stand-in for the TERO cell: a burst of pulses after each restart.
  always @(posedge ctrl) begin
    n_pulses = $urandom_range(50, 0);
    for (int i = 0; i < n_pulses; i++) begin
      #300 tero_osc = 1'b0;
      #300 tero_osc = 1'b1;
    end
  end

  // The first control period after reset may start from an uncleared T flip-flop (it is
  // only cleared by a falling edge of ctrl or rst_n), so its bit is not checked.
  int unsigned falls = 0;
  always @(negedge ctrl) if (rst_n) begin
    #1;
    falls++;
    if (falls > 1) check(noise == 1'(n_pulses % 2), "parity of the oscillation count");
    bits++;
    ones += noise;
  end

  // Control period: 128 ro_clk cycles, 64 of them high.
  always @(posedge ro_clk) if (rst_n) begin
    #1;
    cyc++;
    if (ctrl) high_cyc++;
    if (ctrl && !prev) begin
      if (periods > 0) begin
        check(cyc == 128, "ctrl period");
        check(high_cyc == 65, "ctrl high time");
      end
      periods++;
      cyc = 0;
      high_cyc = 1;
    end
    prev = ctrl;
  end

  initial begin
    #100 rst_n = 1'b0;
    #2100 rst_n = 1'b1;
    wait (bits == 100);
    check(ones > 25 && ones < 75, "both bit values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 128 * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
