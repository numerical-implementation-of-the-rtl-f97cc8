// tb_mca: drives the multichannel analyzer with ideal trapezoids (300-sample
// edges, 200-sample flat top, 10000 samples apart) of known heights, then
// reads one full spectrum over AXI4-Stream. Each trapezoid must produce one
// event, in channel floor(1023 * h) (exact here, the flat top being constant)
// or 1023 for heights above full scale, and the spectrum must hold exactly
// those counts. A trapezoid of 1% of full scale is below the detection
// threshold that the derivative filter constant a and offset c set (about
// 3%) and must not be counted.
module tb_mca;
  import spectro_pkg::*;
  localparam int A = 300, B = 200, PERIOD = 10000;

  logic clk = 1'b0, rst = 1'b1;
  tpz_t v_tpz = '0;
  channel_t maxima;
  logic event_valid, ready;
  logic [15:0] dropped;
  logic [31:0] tdata;
  logic tvalid, tready = 1'b0, tlast;
  int checks = 0, failures = 0, n_events = 0;
  int expected [1024];
  int n_expected = 0;

  always #5 clk = ~clk;

  mca dut (
    .clk, .rst, .v_tpz, .maxima, .event_valid, .ready, .dropped,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast)
  );

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (event_valid && !rst) n_events++;

  task automatic trapezoid(input real h, input bit counted = 1'b1);
    int code, ch;
    code = int'(h * 16384.0);
    for (int k = 0; k < PERIOD; k++) begin
      @(negedge clk);
      if (k < A) v_tpz = tpz_t'((code * k) / A);
      else if (k < A + B) v_tpz = tpz_t'(code);
      else if (k < 2 * A + B) v_tpz = tpz_t'((code * (2 * A + B - k)) / A);
      else v_tpz = '0;
    end
    ch = (code * 1023) / 16384;
    if (ch > 1023) ch = 1023;
    if (counted) begin
      expected[ch]++;
      n_expected++;
    end
  endtask

  initial begin
    automatic real heights [7] = '{0.25, 0.5, 0.125, 0.9, 0.5, 1.5, 0.05};
    foreach (expected[k]) expected[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    wait (ready);
    foreach (heights[k]) trapezoid(heights[k]);
    // below the detection threshold set by a and c (about 3% of full scale)
    trapezoid(0.01, 1'b0);
    begin
      automatic int expect_ch = 0, total = 0;
      automatic bit started = 1'b0;
      while (1) begin
        @(negedge clk) tready = ($urandom_range(1) != 0);
        @(posedge clk);
        if (tvalid && tready) begin
          automatic int ch = int'(tdata[25:16]);
          automatic int cnt = int'(tdata[15:0]);
          if (!started && ch != 0) continue;
          started = 1'b1;
          checks++;
          if (ch != expect_ch || cnt != expected[ch] || tlast != (ch == 1023)) begin
            failures++;
            $display("channel %0d count %0d last %0b, expected channel %0d count %0d",
                     ch, cnt, tlast, expect_ch, expected[expect_ch]);
          end
          total += cnt;
          expect_ch++;
          if (ch == 1023) break;
        end
      end
      checks += 2;
      if (total != n_expected || n_events != n_expected) begin
        failures++;
        $display("%0d counts, %0d events, expected %0d", total, n_events, n_expected);
      end
      if (expected[1023] == 0) begin failures++; $display("clamped channel not used"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
