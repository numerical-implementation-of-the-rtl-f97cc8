// tb_dts_stage1: checks I(n) = V(n) - beta V(n-1) against the same formula in
// floating point with the exact beta = exp(-0.002). The fixed-point result may
// differ by the rounding of the product and of beta, at most one LSB (2**-23).
// Random samples, full-scale samples and an exponential pulse (which must
// collapse to a single impulse) are applied; the result is checked one clock
// after each sample.
module tb_dts_stage1;
  import spectro_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  adc_t din = '0;
  s1_t  i_out;
  int checks = 0, failures = 0;
  real beta;
  real v_prev = 0.0;

  always #5 clk = ~clk;

  dts_stage1 dut (.clk, .rst, .din, .i_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int code);
    real v, expected, got;
    @(negedge clk);
    din = adc_t'(code);
    v = real'(code) / 8192.0;
    @(posedge clk); #1;
    expected = v - beta * v_prev;
    got = real'(i_out) / 8388608.0;
    checks++;
    if ((got - expected) * 8388608.0 > 1.01 || (expected - got) * 8388608.0 > 1.01) begin
      failures++;
      if (failures < 10) $display("V=%f Vprev=%f I=%.9f expected=%.9f", v, v_prev, got, expected);
    end
    v_prev = v;
  endtask

  initial begin
    beta = $exp(-10.0 / 5000.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    apply(8191); apply(-8192); apply(-8192); apply(8191); apply(0);
    for (int k = 0; k < 3000; k++) apply(int'($urandom_range(16383)) - 8192);
    // exponential pulse of amplitude 0.75: only the first I is large
    for (int k = 0; k < 50; k++) apply(int'(0.75 * 8192.0 * $pow(beta, real'(k))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
