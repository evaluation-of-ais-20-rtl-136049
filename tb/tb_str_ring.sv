// tb_str_ring: runs the default self-timed ring (255 stages, 128 events). At 50 instants
// the number of events (stages whose output differs from the next stage's) must still be
// 128, since the handshake neither creates nor destroys events; every stage must toggle,
// and all stages at the same rate, as the events circulate without collisions.
module tb_str_ring;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned L = 255;
  localparam int unsigned E = 128;

  int checks = 0, failures = 0;
  logic [L-1:0] c;

  str_ring dut (.c(c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int unsigned toggles [L];
  logic [L-1:0] c_prev;
  int unsigned tokens, tmin, tmax;

  initial begin
    foreach (toggles[i]) toggles[i] = 0;
    #1;
    c_prev = c;
    for (int s = 0; s < 50; s++) begin
      repeat (40) begin
        #100;
        for (int i = 0; i < L; i++) if (c[i] != c_prev[i]) toggles[i]++;
        c_prev = c;
      end
      tokens = 0;
      for (int i = 0; i < L; i++) if (c[i] != c[(i + 1) % L]) tokens++;
      check(tokens == E, "number of events conserved");
    end
    tmin = toggles[0];
    tmax = toggles[0];
    foreach (toggles[i]) begin
      if (toggles[i] < tmin) tmin = toggles[i];
      if (toggles[i] > tmax) tmax = toggles[i];
    end
    $display("toggles per stage: %0d..%0d in 200 ns", tmin, tmax);
    check(tmin > 50, "every stage oscillates");
    check(tmax - tmin <= 2, "all stages at the same rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
