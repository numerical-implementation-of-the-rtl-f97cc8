// tb_mca_maxima_capture: random `falling` waveforms and channels; the output
// must carry the channel for exactly the clock after each low-to-high edge of
// `falling` (when the channel is not zero) and be zero otherwise.
module tb_mca_maxima_capture;
  import spectro_pkg::*;

  logic clk = 1'b0, rst = 1'b1, falling = 1'b0;
  channel_t channel = '0, maxima;
  logic event_valid;
  int checks = 0, failures = 0, events = 0;

  always #5 clk = ~clk;

  mca_maxima_capture dut (.clk, .rst, .falling, .channel, .maxima, .event_valid);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      int expected;
      @(negedge clk);
      falling = ($urandom_range(3) == 0) ? ~falling : falling;
      channel = ($urandom_range(7) == 0) ? '0 : channel_t'($urandom);
      expected = (falling && !prev && channel != 0) ? int'(channel) : 0;
      prev = falling;
      @(posedge clk); #1;
      checks++;
      if (int'(maxima) != expected || event_valid != (expected != 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d maxima=%0d valid=%0b expected=%0d", n, maxima, event_valid, expected);
      end
      if (expected != 0) events++;
    end
    checks++;
    if (events < 100) begin failures++; $display("too few events: %0d", events); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
