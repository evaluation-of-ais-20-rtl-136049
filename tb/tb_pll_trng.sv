// tb_pll_trng: clk_ref is a clock and clk_jit a random level driven between clk_ref
// edges. A reference accumulator XORs every sample; on every KD-th clk_ref edge the
// output strobe must rise and noise must equal the accumulator. Run at a small KD and at
// the default KD of 1377.
module tb_pll_trng;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned KS = 5;
  localparam int unsigned KL = trng_pkg::PLL_KD_SPARTAN6;

  int checks = 0, failures = 0;
  logic clk_jit = 1'b0, clk_ref = 1'b0, rst_n = 1'b0;
  logic noise_s, clk_s, noise_l, clk_l;

  pll_trng #(.KD(KS)) dut_s (.clk_jit(clk_jit), .clk_ref(clk_ref), .rst_n(rst_n), .noise(noise_s), .clk_o(clk_s));
  pll_trng dut_l (.clk_jit(clk_jit), .clk_ref(clk_ref), .rst_n(rst_n), .noise(noise_l), .clk_o(clk_l));

  always #1000 clk_ref = ~clk_ref;
  always @(negedge clk_ref) clk_jit <= 1'($urandom);

  int unsigned n = 0, bits_s = 0, bits_l = 0, ones = 0;
  logic acc = 1'b0, prev_s = 1'b0, prev_l = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at clk_ref edge %0d", what, n);
    end
  endtask

  always @(posedge clk_ref) if (rst_n) begin
    n++;
    acc ^= clk_jit;
    #1;
    check((clk_s && !prev_s) == ((n - 1) % KS == 0), "small counter period");
    check((clk_l && !prev_l) == ((n - 1) % KL == 0), "default counter period");
    if ((n - 1) % KS == 0) begin
      check(noise_s == acc, "small KD output bit");
      bits_s++;
      ones += noise_s;
    end
    if ((n - 1) % KL == 0) begin
      check(noise_l == acc, "default KD output bit");
      bits_l++;
    end
    prev_s = clk_s;
    prev_l = clk_l;
  end

  initial begin
    #3500 rst_n = 1'b1;
    wait (bits_l == 4);
    check(ones > bits_s / 4 && ones < 3 * bits_s / 4, "both bit values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2000.0 * KL * 8);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
