// tb_freq_divider: checks the divide-by-K counter at a small K and at the default K.
// An independent cycle counter predicts the input edges on which the divided clock must
// rise (1, 1+K, 1+2K, ...) and how many input cycles it stays high (floor(K/2)).
module tb_freq_divider;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned KS = 5;
  localparam int unsigned KL = 80000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic out_s, out_l;

  freq_divider #(.K(KS), .WIDTH(3)) dut_s (.clk_in(clk), .rst_n(rst_n), .clk_out(out_s));
  freq_divider dut_l (.clk_in(clk), .rst_n(rst_n), .clk_out(out_l));

  always #500 clk = ~clk;

  int unsigned n = 0;
  logic prev_s = 1'b0, prev_l = 1'b0;
  int unsigned high_s = 0, high_l = 0, rises_s = 0, rises_l = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at cycle %0d (rises_s=%0d)", what, n, rises_s);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    n++;
    #1;
    if (out_s && !prev_s) begin
      check((n - 1) % KS == 0, "small divider rise position");
      if (rises_s > 0) check(high_s == KS / 2, "small divider high time");
      rises_s++;
      high_s = 0;
    end
    if (out_l && !prev_l) begin
      check((n - 1) % KL == 0, "default divider rise position");
      if (rises_l > 0) check(high_l == KL / 2, "default divider high time");
      rises_l++;
      high_l = 0;
    end
    if (out_s) high_s++;
    if (out_l) high_l++;
    // Between rises the output must not rise at any other edge.
    if (!out_s && prev_s) check(high_s == KS / 2, "small divider fall position");
    prev_s = out_s;
    prev_l = out_l;
  end

  initial begin
    #2300 rst_n = 1'b1;
    wait (rises_l == 4);
    #10250;
    check(rises_s == (n - 1) / KS + 1, "number of small divider periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * (5 * KL));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
