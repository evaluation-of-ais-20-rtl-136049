// tb_str_trng: drives the 255 stage outputs as random levels that change between clock
// edges and expects, on every clock edge, the XOR of the values sampled one edge before
// (two-stage pipeline, one bit per clock).
module tb_str_trng;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned L = 255;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [L-1:0] c = '0;
  logic noise, clk_o;

  str_trng dut (.clk(clk), .c(c), .noise(noise), .clk_o(clk_o));

  always #3247 clk = ~clk;
  always @(negedge clk) for (int i = 0; i < L; i++) c[i] <= 1'($urandom);

  int unsigned n = 0, ones = 0;
  logic [L-1:0] s_now, s_prev;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at edge %0d", what, n);
    end
  endtask

  always @(posedge clk) begin
    s_now = c;
    #1;
    if (n >= 2) begin
      check(noise == ^s_prev, "XOR of the sampled stages");
      check(clk_o == clk, "strobe follows the sampling clock");
      ones += noise;
    end
    s_prev = s_now;
    n++;
  end

  initial begin
    wait (n == 500);
    #10;
    check(ones > 150 && ones < 350, "both bit values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(6494.0 * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
