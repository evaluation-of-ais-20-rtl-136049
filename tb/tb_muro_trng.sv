// tb_muro_trng: M ring outputs are driven as random levels that change between ro_r edges;
// ro_r is a clock. The testbench predicts the reference-clock edges (every K ro_r edges),
// records the ring values there and expects their XOR on noise one reference period later.
module tb_muro_trng;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned M = 8;
  localparam int unsigned K = 3;

  int checks = 0, failures = 0;
  logic [M-1:0] ro = '0;
  logic ro_r = 1'b0, rst_n = 1'b0;
  logic noise, clk_o;

  muro_trng #(.M(M), .K(K), .WIDTH(2)) dut (.ro(ro), .ro_r(ro_r), .rst_n(rst_n), .noise(noise), .clk_o(clk_o));

  always #1500 ro_r = ~ro_r;
  always @(negedge ro_r) ro <= M'($urandom);

  int unsigned n = 0, refs = 0, bits = 0, ones = 0;
  logic prev = 1'b0;
  logic [M-1:0] sampled, last_sampled;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at ro_r edge %0d", what, n);
    end
  endtask

  always @(posedge ro_r) if (rst_n) begin
    n++;
    sampled = ro;
    #1;
    check((clk_o && !prev) == ((n - 1) % K == 0), "reference clock edge position");
    if ((n - 1) % K == 0) begin
      if (refs >= 1) begin
        check(noise == ^last_sampled, "XOR of the sampled rings");
        bits++;
        ones += noise;
      end
      last_sampled = sampled;
      refs++;
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
