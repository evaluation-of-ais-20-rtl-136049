// tb_coso_trng: s2 is a clock; s1 is driven (between s2 edges) as a beat pattern whose
// periods P, in s2 cycles, are random. After each beat period the generator must output
// the parity of the s2 cycles counted since the previous beat, (P-1) mod 2, one bit per
// beat period, with its strobe rising on the s2 edge after the beat is sampled.
module tb_coso_trng;
  timeunit 1ps;
  timeprecision 1fs;

  int checks = 0, failures = 0;
  logic s1 = 1'b0, s2 = 1'b0, rst_n = 1'b0;
  logic noise, clk_o;

  coso_trng dut (.s1(s1), .s2(s2), .rst_n(rst_n), .noise(noise), .clk_o(clk_o));

  always #500 s2 = ~s2;

  int unsigned period_q[$];
  int unsigned cur_p = 0, pos = 0, n = 0, bits = 0, beats = 0;
  int unsigned beat_start[$];
  logic prev = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at s2 edge %0d", what, n);
    end
  endtask

  // Beat pattern: high for the first half of each period, low for the rest.
  always @(negedge s2) if (rst_n) begin
    if (pos == cur_p) begin
      cur_p = $urandom_range(30, 4);
      pos   = 0;
      period_q.push_back(cur_p);
    end
    s1 <= (pos < cur_p / 2);
    pos++;
  end

  int unsigned p_done;
  always @(posedge s2) if (rst_n) begin
    n++;
    #1;
    if (clk_o && !prev) begin
      beats++;
      // Strobe k (k >= 2) closes beat period k-1, whose length is period_q[k-2].
      if (beats >= 2) begin
        p_done = period_q.pop_front();
        check(noise == 1'((p_done - 1) % 2), "parity of the beat period");
        bits++;
      end
    end
    prev = clk_o;
  end

  initial begin
    #2200 rst_n = 1'b1;
    wait (bits == 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 31 * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
