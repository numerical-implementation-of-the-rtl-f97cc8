// tb_spectrometer_top: end-to-end run of the spectrometer at its default
// parameters (A = 300, B = 200, 10 ns samples, 5 us decay, 1024 channels).
//
// The testbench plays the preamplifier and ADC: it sums exponential pulses
// E * beta**n (beta = exp(-0.002)), 10000 samples (100 us) apart, rounds them
// to 14-bit codes and drives adc_data. It exercises
//  - a pulse right after reset, whose event arrives while the histogram is
//    still being cleared and must be dropped;
//  - positive pulses of several heights, each expected in channel
//    floor(1023 * E) within +-2 channels;
//  - negative pulses with `invert` set, which must land where positive ones do;
//  - two piled-up pulses whose sum exceeds full scale, which must land in the
//    top channel 1023 (clamping);
//  - a full readout of the spectrum over AXI4-Stream with random TREADY
//    back-pressure, checked against the expected histogram.
//  - the trace capture of the first pulse (threshold 0.1): its length and
//    the peak of the stored trapezoid, then re-arming.
// Every mechanism is counted, and one that never happened is a failure.
module tb_spectrometer_top;
  import spectro_pkg::*;
  localparam int PERIOD = 10000;

  logic clk = 1'b0, rst = 1'b1, invert = 1'b0;
  logic [ADC_W-1:0] adc_data = '0;
  tpz_t v_tpz;
  channel_t maxima;
  logic event_valid, mca_ready;
  logic [15:0] dropped;
  logic [31:0] tdata;
  logic tvalid, tready = 1'b0, tlast;
  logic trace_arm = 1'b0, trace_done;
  tpz_t trace_threshold = tpz_t'(16'sd1638);   // 0.1
  logic [DLY_AW:0] trace_length;
  logic [DLY_AW-1:0] trace_rd_addr = '0;
  trace_sample_t trace_rd_data;
  int n_traces = 0;

  int checks = 0, failures = 0;
  int n_events = 0, n_inverted = 0, n_clamped = 0, n_stalls = 0;
  real beta, pulse_state = 0.0;
  int expected_ch [$];     // channel expected for each counted pulse
  int hist_hw [1024];

  always #5 clk = ~clk;

  spectrometer_top dut (
    .clk, .rst, .adc_data, .invert, .v_tpz, .maxima, .event_valid,
    .mca_ready, .dropped,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .trace_arm, .trace_threshold, .trace_done, .trace_length, .trace_rd_addr, .trace_rd_data
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (event_valid && !rst) begin
    n_events++;
    $display("event: channel %0d at %0t", maxima, $time);
    if (invert) n_inverted++;
    if (maxima == 10'd1023) n_clamped++;
  end

  // one ADC sample; amp != 0 starts a new pulse in this sample
  task automatic sample(input real amp);
    real v;
    int code;
    pulse_state = pulse_state * beta + amp;
    v = pulse_state * 8192.0;
    code = int'($floor(v + 0.5));
    if (code > 8191) code = 8191;
    if (code < -8192) code = -8192;
    @(negedge clk) adc_data = ADC_W'(code);
  endtask

  task automatic pulse(input real amp, input int len);
    sample(amp);
    repeat (len - 1) sample(0.0);
  endtask

  initial begin
    beta = $exp(-10.0 / 5000.0);
    foreach (hist_hw[k]) hist_hw[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // pulse during the clearing pass: dropped
    pulse(0.5, PERIOD);
    checks++;
    if (dropped != 16'd1 || !mca_ready) begin
      failures++;
      $display("dropped=%0d ready=%0b, expected one dropped event", dropped, mca_ready);
    end

    // the trace capture, armed since reset, holds that first pulse: the part of
    // its trapezoid above 0.1, about 200 + 2 * 0.8 * 300 = 680 samples, with
    // a peak of 0.5
    begin
      automatic int peak = 0;
      for (int k = 0; k < int'(trace_length); k++) begin
        @(negedge clk) trace_rd_addr = DLY_AW'(k);
        @(posedge clk); #1;
        if (int'(trace_rd_data.vtpz) > peak) peak = int'(trace_rd_data.vtpz);
      end
      $display("trace: %0d samples, peak %0d (0.5 = 8192)", trace_length, peak);
      checks++;
      if (!trace_done || trace_length < 670 || trace_length > 695 || peak < 8150 || peak > 8235) begin
        failures++;
        $display("trace of the first pulse: done=%0b length=%0d peak=%0d", trace_done, trace_length, peak);
      end else n_traces++;
      @(negedge clk) trace_arm = 1'b1;
      @(negedge clk) trace_arm = 1'b0;
      trace_threshold = tpz_t'(16'sd16383);       // nothing more is captured
    end

    // positive pulses
    begin
      automatic real amps [8] = '{0.2, 0.5, 0.5, 0.8, 0.35, 0.95, 0.05, 0.65};
      foreach (amps[k]) begin
        expected_ch.push_back(int'($floor(1023.0 * amps[k])));
        pulse(amps[k], PERIOD);
      end
    end

    // negative-polarity pulses through the sign inverter
    @(negedge clk) invert = 1'b1;
    begin
      automatic real amps [3] = '{-0.3, -0.7, -0.5};
      foreach (amps[k]) begin
        expected_ch.push_back(int'($floor(-1023.0 * amps[k])));
        pulse(amps[k], PERIOD);
      end
    end
    @(negedge clk) invert = 1'b0;

    // pile-up: 0.5 then 0.55 100 samples later, flat top above full scale
    pulse(0.5, 100);
    pulse(0.55, PERIOD);
    expected_ch.push_back(1023);

    // read one complete spectrum, starting at channel 0
    begin
      automatic int expect_ch = 0, total = 0;
      automatic bit started = 1'b0;
      while (1) begin
        @(negedge clk) tready = ($urandom_range(3) != 0);
        @(posedge clk);
        if (tvalid && !tready) n_stalls++;
        if (tvalid && tready) begin
          automatic int ch, cnt;
          ch  = int'(tdata[25:16]);
          cnt = int'(tdata[15:0]);
          if (!started && ch != 0) continue;
          started = 1'b1;
          checks++;
          if (ch != expect_ch || tlast != (ch == 1023)) begin
            failures++;
            $display("beat for channel %0d (last=%0b), expected channel %0d", ch, tlast, expect_ch);
          end
          hist_hw[ch] = cnt;
          total += cnt;
          expect_ch++;
          if (ch == 1023) break;
        end
      end
      @(negedge clk) tready = 1'b0;
      checks++;
      if (total != expected_ch.size()) begin
        failures++;
        $display("spectrum holds %0d counts, expected %0d", total, expected_ch.size());
      end
    end

    // each expected pulse must find a count within +-2 channels
    foreach (expected_ch[k]) begin
      automatic bit found = 1'b0;
      for (int c = expected_ch[k] - 2; c <= expected_ch[k] + 2 && !found; c++)
        if (c >= 0 && c < 1024 && hist_hw[c] > 0) begin
          hist_hw[c]--;
          found = 1'b1;
          $display("pulse %0d: expected channel %0d, counted in %0d", k, expected_ch[k], c);
        end
      checks++;
      if (!found) begin
        failures++;
        $display("pulse %0d: no count near channel %0d", k, expected_ch[k]);
      end
    end

    // mechanisms
    $display("events %0d, with inversion %0d, clamped %0d, dropped %0d, stalled beats %0d",
             n_events, n_inverted, n_clamped, dropped, n_stalls);
    checks += 5;
    if (n_events != expected_ch.size() + 1) begin
      failures++;
      $display("%0d events, expected %0d", n_events, expected_ch.size() + 1);
    end
    if (n_inverted == 0) begin failures++; $display("sign inversion never used"); end
    if (n_clamped == 0)  begin failures++; $display("channel clamping never happened"); end
    if (dropped == 0)    begin failures++; $display("no event dropped while clearing"); end
    if (n_stalls == 0)   begin failures++; $display("no stream back-pressure"); end
    checks++;
    if (n_traces == 0)   begin failures++; $display("no pulse trace captured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
