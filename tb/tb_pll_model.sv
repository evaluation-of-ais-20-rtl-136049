// tb_pll_model: feeds a 5000 ps clock into the PLL model with the Spartan 6 PLL1 factors
// (37/81) and the PLL2 factors (17/7) and checks locked and the mean output periods,
// 5000*81/37 ps and 5000*7/17 ps, over 1000 output periods.
module tb_pll_model;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic clk_in = 1'b0;
  logic o1, o2, l1, l2;

  pll_model dut1 (.clk_in(clk_in), .clk_out(o1), .locked(l1));
  pll_model #(.KM(17), .KD(7)) dut2 (.clk_in(clk_in), .clk_out(o2), .locked(l2));

  always #2500 clk_in = ~clk_in;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic measure(ref logic o, input real expected, input string what);
    realtime t0;
    real mean;
    @(posedge o);
    t0 = $realtime;
    repeat (1000) @(posedge o);
    mean = ($realtime - t0) / 1000.0;
    $display("%s: mean period %f ps, expected %f ps", what, mean, expected);
    check(mean > expected - 0.5 && mean < expected + 0.5, what);
  endtask

  initial begin
    #1;
    check(!l1 && !l2, "not locked before the input runs");
    #20000;
    check(l1 && l2, "locked");
    fork
      measure(o1, 5000.0 * 81.0 / 37.0, "PLL1 period");
      measure(o2, 5000.0 * 7.0 / 17.0, "PLL2 period");
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
