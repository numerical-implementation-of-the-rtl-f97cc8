// tb_dts_stage4: checks V = T/A in floating point. The 18.18 constant 1/A and the
// final rounding allow an error of (|T| * 2**-19 + 2**-15); values whose
// quotient is outside 16.14 must saturate. Latency is two clocks.
module tb_dts_stage4;
  import spectro_pkg::*;
  localparam int A = 300;

  logic clk = 1'b0, rst = 1'b1;
  s3_t  t_in = '0;
  tpz_t v_out;
  int checks = 0, failures = 0, sat_hits = 0;
  real exp_q [$];

  always #5 clk = ~clk;

  dts_stage4 #(.A(A)) dut (.clk, .rst, .t_in, .v_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int value);
    real t, q, got, tol;
    @(negedge clk);
    t_in = s3_t'(value);
    t = real'(value) / 16384.0;
    q = t / real'(A);
    if (q > 32767.0 / 16384.0) q = 32767.0 / 16384.0;
    if (q < -2.0) q = -2.0;
    exp_q.push_back(q);
    exp_q.push_back(t);
    @(posedge clk); #1;
    if (exp_q.size() > 2) begin
      q = exp_q.pop_front();
      t = exp_q.pop_front();
      got = real'(v_out) / 16384.0;
      tol = (t < 0 ? -t : t) / 524288.0 + 1.0 / 32768.0 + 1e-12;
      checks++;
      if (got - q > tol || q - got > tol) begin
        failures++;
        if (failures < 10) $display("T=%f V=%f expected=%f", t, got, q);
      end
      if (q >= 32767.0 / 16384.0 || q <= -2.0) sat_hits++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    apply(300 * 16384); apply(-300 * 16384); apply(0); apply(1);
    for (int k = 0; k < 3000; k++) apply(int'($urandom_range(32'h03FF_FFFF)) - 32'sh0200_0000);
    apply(0); apply(0);
    checks++;
    if (sat_hits == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("saturated results: %0d", sat_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
