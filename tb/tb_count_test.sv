// tb_count_test: the counting test of the spectrometer at its default
// parameters. A long series of identical pulses is sent, and the sum of the
// counts over all channels must equal the number of pulses sent: no count may
// be lost or added.
//
// The testbench plays a negative-polarity source: 2000 pulses of fixed height
// -0.5 full scale, decaying with 5 us (beta = exp(-0.002)), 10000 samples
// (100 us) apart, with +-2 LSB of uniform noise on every ADC code. `invert` is
// set throughout. The first pulse starts after the histogram's clearing pass,
// so nothing may be dropped.
//
// Checks:
//  - the number of events equals the number of pulses;
//  - every event lands within +-2 channels of floor(1023 * 0.5) = 511;
//  - a complete spectrum read over AXI4-Stream (with random TREADY) holds, for
//    every channel, exactly the number of events the testbench saw on
//    `maxima` for it, and sums to the number of pulses;
//  - `dropped` stays 0.
// The run takes 20 million clocks, a few tens of seconds in verilator.
module tb_count_test;
  import spectro_pkg::*;
  localparam int PERIOD   = 10000;
  localparam int N_PULSES = 2000;
  localparam real HEIGHT  = -0.5;

  logic clk = 1'b0, rst = 1'b1, invert = 1'b1;
  logic [ADC_W-1:0] adc_data = '0;
  tpz_t v_tpz;
  channel_t maxima;
  logic event_valid, mca_ready;
  logic [15:0] dropped;
  logic [31:0] tdata;
  logic tvalid, tready = 1'b0, tlast;

  int checks = 0, failures = 0;
  int n_events = 0, n_stalls = 0;
  real beta, pulse_state = 0.0;
  int hist_ref [1024];

  always #5 clk = ~clk;

  spectrometer_top dut (
    .clk, .rst, .adc_data, .invert, .v_tpz, .maxima, .event_valid,
    .mca_ready, .dropped,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast),
    .trace_arm(1'b0), .trace_threshold('0), .trace_done(), .trace_length(), .trace_rd_addr('0),
    .trace_rd_data()
  );

  initial begin
    repeat (N_PULSES * PERIOD + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // events as the MCA reports them, histogrammed independently of its RAM
  always @(posedge clk) if (event_valid && !rst) begin
    n_events++;
    hist_ref[maxima]++;
    checks++;
    if (int'(maxima) < 509 || int'(maxima) > 513) begin
      failures++;
      $display("event %0d in channel %0d, expected 511 +-2", n_events, maxima);
    end
  end

  // one noisy ADC sample; amp != 0 starts a new pulse in this sample
  task automatic sample(input real amp);
    int code;
    pulse_state = pulse_state * beta + amp;
    code = int'($floor(pulse_state * 8192.0 + 0.5)) + int'($urandom_range(4)) - 2;
    if (code > 8191) code = 8191;
    if (code < -8192) code = -8192;
    @(negedge clk) adc_data = ADC_W'(code);
  endtask

  initial begin
    beta = $exp(-10.0 / 5000.0);
    foreach (hist_ref[k]) hist_ref[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (mca_ready);

    for (int p = 0; p < N_PULSES; p++) begin
      sample(HEIGHT);
      repeat (PERIOD - 1) sample(0.0);
    end

    checks++;
    if (n_events != N_PULSES) begin
      failures++;
      $display("%0d events for %0d pulses", n_events, N_PULSES);
    end

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
          if (ch != expect_ch || cnt != hist_ref[ch]) begin
            failures++;
            $display("channel %0d holds %0d counts, expected channel %0d with %0d",
                     ch, cnt, expect_ch, hist_ref[expect_ch]);
          end
          if (cnt > 0) $display("channel %0d: %0d counts", ch, cnt);
          total += cnt;
          expect_ch++;
          if (ch == 1023) break;
        end
      end
      @(negedge clk) tready = 1'b0;
      $display("pulses sent %0d, events %0d, counts in spectrum %0d, dropped %0d, stalled beats %0d",
               N_PULSES, n_events, total, dropped, n_stalls);
      checks += 2;
      if (total != N_PULSES) begin
        failures++;
        $display("spectrum holds %0d counts, expected %0d", total, N_PULSES);
      end
      if (dropped != 16'd0) begin
        failures++;
        $display("%0d events dropped", dropped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
