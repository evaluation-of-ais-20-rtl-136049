// tb_ero_trng: drives ro2 as a clock and ro1 as a random level that changes only between
// ro2 edges. The testbench counts ro2 edges itself: on edges 1, 1+K, ... the divided clock
// must rise and noise must take the value ro1 had at that edge. Checks the bit rate
// (one bit per K ro2 periods) and every sampled bit.
module tb_ero_trng;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K = 7;

  int checks = 0, failures = 0;
  logic ro1 = 1'b0, ro2 = 1'b0, rst_n = 1'b0;
  logic noise, clk_o;

  ero_trng #(.K(K), .WIDTH(3)) dut (.ro1(ro1), .ro2(ro2), .rst_n(rst_n), .noise(noise), .clk_o(clk_o));

  always #1500 ro2 = ~ro2;
  always @(negedge ro2) ro1 <= 1'($urandom);

  int unsigned n = 0, bits = 0, ones = 0;
  logic prev = 1'b0, expect_bit;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at ro2 edge %0d", what, n);
    end
  endtask

  always @(posedge ro2) if (rst_n) begin
    n++;
    expect_bit = ro1;
    #1;
    check((clk_o && !prev) == ((n - 1) % K == 0), "divided clock edge position");
    if ((n - 1) % K == 0) begin
      check(noise == expect_bit, "sampled bit");
      bits++;
      ones += noise;
    end
    prev = clk_o;
  end

  initial begin
    #4000 rst_n = 1'b1;
    wait (bits == 200);
    check(ones > 50 && ones < 150, "both bit values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(3000.0 * K * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
