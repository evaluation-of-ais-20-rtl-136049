// tb_ring_osc: measures 4000 periods of the default ring oscillator (N = 3, 500 ps per
// stage): the mean period must be 3000 ps and the period jitter close to 4 ps. Then
// checks that the output rests at 1 while disabled and oscillates again when re-enabled.
module tb_ring_osc;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic en = 1'b1;
  logic out;

  ring_osc dut (.en(en), .out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  realtime t_prev;
  real p, sum, sum2, mean, sd;
  int unsigned edges;

  initial begin
    sum = 0.0; sum2 = 0.0;
    repeat (10) @(posedge out);  // skip the random start-up phase
    t_prev = $realtime;
    for (int i = 0; i < 4000; i++) begin
      @(posedge out);
      p = $realtime - t_prev;
      t_prev = $realtime;
      sum += p;
      sum2 += p * p;
    end
    mean = sum / 4000.0;
    sd = $sqrt(sum2 / 4000.0 - mean * mean);
    $display("mean period %f ps, period jitter %f ps", mean, sd);
    check(mean > 2999.0 && mean < 3001.0, "mean period");
    check(sd > 3.0 && sd < 5.0, "period jitter");
    en = 1'b0;
    #10000;
    edges = 0;
    fork
      begin : count
        forever begin
          @(out);
          edges++;
        end
      end
      #20000;
    join_any
    disable count;
    check(edges == 0 && out == 1'b1, "disabled oscillator rests at 1");
    en = 1'b1;
    edges = 0;
    repeat (10) @(posedge out);
    check(1'b1, "oscillates again after enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
