// tb_trapezoidal_filter: feeds quantised exponential pulses E * beta**n (decay
// time 500 samples) and checks the shaper output two ways:
//  - sample by sample against the four recursions evaluated in floating point on
//    the same input samples, with the exact beta, within 3e-4 (about 5 LSB of
//    the 16.14 output, the budget of the rounding steps inside the filter);
//  - per pulse of E >= 0.2 (smaller ones are distorted by the input
//    quantisation, in the reference as much as in the filter), that the trapezoid rises from 5% to 95% of E in 0.9*A samples
//    and then stays within 0.4% of E for about B samples.
// Output latency: vout after clock edge m equals T(m-5)/A.
module tb_trapezoidal_filter;
  import spectro_pkg::*;
  localparam int A = 300;
  localparam int B = 200;
  localparam int GAP = 2500;

  logic clk = 1'b0, rst = 1'b1;
  adc_t vin = '0;
  tpz_t vout;
  int checks = 0, failures = 0, pulses_checked = 0;
  real beta, v_prev = 0.0;
  real i_hist [$];
  real r_hist [$];
  real t_hist [$];
  real r_sum = 0.0, t_sum = 0.0;

  always #5 clk = ~clk;

  trapezoidal_filter dut (.clk, .rst, .vin, .vout);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one sample, return the hardware output after the clock edge
  task automatic step(input int code, output real got, output real expected);
    real v, i_n;
    @(negedge clk);
    vin = adc_t'(code);
    v = real'(code) / 8192.0;
    i_n = v - beta * v_prev;
    v_prev = v;
    i_hist.push_front(i_n);
    r_sum += i_n;
    if (i_hist.size() > A) r_sum -= i_hist.pop_back();
    r_hist.push_front(r_sum);
    t_sum += r_sum;
    if (r_hist.size() > A + B) t_sum -= r_hist.pop_back();
    t_hist.push_front(t_sum);
    if (t_hist.size() > 8) void'(t_hist.pop_back());
    @(posedge clk); #1;
    got = real'(vout) / 16384.0;
    expected = (t_hist.size() > 5) ? t_hist[5] / real'(A) : 0.0;
    checks++;
    if (got - expected > 3e-4 || expected - got > 3e-4) begin
      failures++;
      if (failures < 10) $display("out=%f expected=%f", got, expected);
    end
  endtask

  task automatic pulse(input real amp);
    real got, expected, top_sum;
    int rise = 0, flat = 0, idx_first = -1;
    top_sum = 0.0;
    for (int k = 0; k < GAP; k++) begin
      step(int'(amp * 8192.0 * $pow(beta, real'(k))), got, expected);
      // shape: samples within 0.4% of E form the flat top; samples between
      // 5% and 95% of E on the way up form 90% of the rising edge
      if (amp >= 0.2) begin
        if (got > amp - 0.004 * amp - 3e-4 && got < amp + 0.004 * amp + 3e-4) begin
          flat++;
          top_sum += got;
        end else if (got > 0.05 * amp && got < 0.95 * amp && flat == 0) rise++;
      end
    end
    if (amp >= 0.2) begin
      checks += 2;
      pulses_checked++;
      if (flat < B - 4 || flat > B + 12) begin
        failures++;
        $display("E=%f flat top %0d samples, expected about %0d", amp, flat, B);
      end
      if (rise < (9 * A) / 10 - 3 || rise > (9 * A) / 10 + 3) begin
        failures++;
        $display("E=%f rising edge %0d samples, expected about %0d", amp, rise, A);
      end
      if (flat > 0) $display("E=%f flat-top mean %f", amp, top_sum / flat);
    end
  endtask

  initial begin
    beta = $exp(-10.0 / 5000.0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    pulse(0.3);
    pulse(0.8);
    pulse(-0.5);
    pulse(0.05);
    pulse(0.95);
    if (pulses_checked != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
