// tb_tero_cell: restarts the TERO cell model 400 times (ctrl high for 800 ns, low for
// 800 ns) and counts the rising edges of each burst. The mean count must be close to 100
// and its spread close to 5; while ctrl is low the output must rest at 1.
module tb_tero_cell;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic ctrl = 1'b0;
  logic out;

  tero_cell dut (.ctrl(ctrl), .out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned cnt;
  real sum, sum2, mean, sd;
  bit low_ok;

  always @(posedge out) if (ctrl) cnt++;

  initial begin
    sum = 0.0; sum2 = 0.0; low_ok = 1'b1;
    #1000;
    for (int i = 0; i < 400; i++) begin
      cnt = 0;
      ctrl = 1'b1;
      #800000;
      ctrl = 1'b0;
      #1;
      if (out != 1'b1) low_ok = 1'b0;
      sum += real'(cnt);
      sum2 += real'(cnt) * real'(cnt);
      #799999;
      if (out != 1'b1) low_ok = 1'b0;
    end
    mean = sum / 400.0;
    sd = $sqrt(sum2 / 400.0 - mean * mean);
    $display("mean oscillations %f, spread %f", mean, sd);
    check(mean > 99.0 && mean < 101.0, "mean number of oscillations");
    check(sd > 4.0 && sd < 6.0, "spread of the number of oscillations");
    check(low_ok, "output at rest while ctrl is low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
