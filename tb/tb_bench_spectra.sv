// tb_bench_spectra: the spectra of the bench measurements, run through the
// spectrometer at its default parameters (A = 300, B = 200, 10 ns samples,
// 5 us decay). A signal generator feeds the ADC negative exponential pulses, so
// `invert` is set throughout. An ADC input of +-1 V is taken as +-1.0 full
// scale, so a pulse of -500 mV is a height of -0.5.
//
// Series sent, 40 pulses each, 10000 samples (100 us) apart, with +-2 LSB of
// uniform noise on every ADC code:
//   fixed -0.21 V and -0.97 V;
//   fixed -0.2 V, -0.5 V and -0.8 V;
//   random heights, uniform between -0.05 V and -0.95 V.
// Every pulse must produce exactly one event, in channel floor(1023 * |E|)
// +-2. A complete spectrum read over AXI4-Stream at the end must then hold,
// per channel, exactly the events seen. Each fixed series must also form a
// peak no wider than 5 channels whose largest bin is its expected channel +-2.
// The run takes about 2.4 million clocks.
module tb_bench_spectra;
  import spectro_pkg::*;
  localparam int PERIOD   = 10000;
  localparam int N_SERIES = 6;
  localparam int N_EACH   = 40;

  logic clk = 1'b0, rst = 1'b1, invert = 1'b1;
  logic [ADC_W-1:0] adc_data = '0;
  tpz_t v_tpz;
  channel_t maxima;
  logic event_valid, mca_ready;
  logic [15:0] dropped;
  logic [31:0] tdata;
  logic tvalid, tready = 1'b0, tlast;

  int checks = 0, failures = 0;
  int n_events = 0;
  real beta, pulse_state = 0.0;
  int expected_ch [$];       // expected channel of each pulse, in order
  int hist_ref [1024];       // events seen on `maxima`
  int hist_series [N_SERIES][1024];
  int series = 0;

  always #5 clk = ~clk;

  spectrometer_top dut (
    .clk, .rst, .adc_data, .invert, .v_tpz, .maxima, .event_valid,
    .mca_ready, .dropped,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .trace_arm(1'b0), .trace_threshold('0), .trace_done(), .trace_length(), .trace_rd_addr('0),
    .trace_rd_data()
  );

  initial begin
    repeat (N_SERIES * N_EACH * PERIOD + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // each event is compared with the pulse it belongs to
  always @(posedge clk) if (event_valid && !rst) begin
    automatic int exp_ch;
    hist_ref[maxima]++;
    hist_series[series][maxima]++;
    checks++;
    if (n_events >= expected_ch.size()) begin
      failures++;
      $display("event %0d in channel %0d with no pulse for it", n_events, maxima);
    end else begin
      exp_ch = expected_ch[n_events];
      if (int'(maxima) < exp_ch - 2 || int'(maxima) > exp_ch + 2) begin
        failures++;
        $display("pulse %0d: channel %0d, expected %0d +-2", n_events, maxima, exp_ch);
      end
    end
    n_events++;
  end

  task automatic sample(input real amp);
    int code;
    pulse_state = pulse_state * beta + amp;
    code = int'($floor(pulse_state * 8192.0 + 0.5)) + int'($urandom_range(4)) - 2;
    if (code > 8191) code = 8191;
    if (code < -8192) code = -8192;
    @(negedge clk) adc_data = ADC_W'(code);
  endtask

  task automatic pulse(input real amp);
    expected_ch.push_back(int'($floor(-1023.0 * amp)));
    sample(amp);
    repeat (PERIOD - 1) sample(0.0);
  endtask

  initial begin
    automatic real fixed [5] = '{-0.21, -0.97, -0.2, -0.5, -0.8};
    beta = $exp(-10.0 / 5000.0);
    foreach (hist_ref[k]) hist_ref[k] = 0;
    foreach (hist_series[s, k]) hist_series[s][k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (mca_ready);

    for (int s = 0; s < N_SERIES; s++) begin
      series = s;
      for (int p = 0; p < N_EACH; p++)
        if (s < 5) pulse(fixed[s]);
        else       pulse(-0.05 - 0.9 * real'($urandom_range(10000)) / 10000.0);
    end

    checks++;
    if (n_events != expected_ch.size()) begin
      failures++;
      $display("%0d events for %0d pulses", n_events, expected_ch.size());
    end

    // the fixed series: narrow peaks at the expected channel
    for (int s = 0; s < 5; s++) begin
      automatic int lo = 1024, hi = -1, peak = 0, exp_ch;
      exp_ch = int'($floor(-1023.0 * fixed[s]));
      for (int c = 0; c < 1024; c++)
        if (hist_series[s][c] > 0) begin
          if (c < lo) lo = c;
          if (c > hi) hi = c;
          if (hist_series[s][c] > hist_series[s][peak]) peak = c;
        end
      $display("series %0d (%0.2f V): peak at channel %0d (%0d counts), channels %0d..%0d",
               s, fixed[s], peak, hist_series[s][peak], lo, hi);
      checks++;
      if (hi - lo > 4 || peak < exp_ch - 2 || peak > exp_ch + 2) begin
        failures++;
        $display("series %0d: peak expected at channel %0d within 5 channels", s, exp_ch);
      end
    end

    // read one complete spectrum, starting at channel 0
    begin
      automatic int expect_ch = 0, total = 0;
      automatic bit started = 1'b0;
      while (1) begin
        @(negedge clk) tready = ($urandom_range(3) != 0);
        @(posedge clk);
        if (tvalid && tready) begin
          automatic int ch, cnt;
          ch  = int'(tdata[25:16]);
          cnt = int'(tdata[15:0]);
          if (!started && ch != 0) continue;
          started = 1'b1;
          checks++;
          if (ch != expect_ch || cnt != hist_ref[ch]) begin
            failures++;
            $display("channel %0d holds %0d counts, expected channel %0d with %0d",
                     ch, cnt, expect_ch, hist_ref[expect_ch]);
          end
          total += cnt;
          expect_ch++;
          if (ch == 1023) break;
        end
      end
      @(negedge clk) tready = 1'b0;
      $display("pulses %0d, events %0d, counts in spectrum %0d, dropped %0d",
               expected_ch.size(), n_events, total, dropped);
      checks++;
      if (total != expected_ch.size() || dropped != 16'd0) begin
        failures++;
        $display("spectrum total %0d, dropped %0d", total, dropped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
