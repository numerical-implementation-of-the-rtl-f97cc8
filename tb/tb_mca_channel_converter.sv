// tb_mca_channel_converter: drives random trapezoid samples (including values
// below 0 and above 1) and checks every channel against
//     floor(1023 * (V(n-DELAY-2) + V(n-DELAY-3)) / 2)   clamped to 0..1023,
// computed in floating point from a software history of the inputs.
module tb_mca_channel_converter;
  import spectro_pkg::*;
  localparam int DELAY = 320;

  logic clk = 1'b0, rst = 1'b1;
  tpz_t v_in = '0;
  channel_t channel;
  int checks = 0, failures = 0, clamp_hi = 0, clamp_lo = 0;
  int hist [$];

  always #5 clk = ~clk;

  mca_channel_converter #(.DELAY(DELAY)) dut (.clk, .rst, .v_in, .channel);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int n = 0; n < 6000; n++) begin
      int code;
      // slowly varying value with jitter, spanning about -0.2 .. 1.2
      code = int'((0.5 + 0.7 * $sin(real'(n) / 300.0)) * 16384.0) + int'($urandom_range(200)) - 100;
      @(negedge clk);
      v_in = tpz_t'(code);
      hist.push_front(code);
      @(posedge clk); #1;
      // hist[0] is the sample taken at this edge; the channel now on the
      // output was formed from the samples DELAY+1 and DELAY+2 edges earlier
      if (hist.size() > DELAY + 3) begin
        real avg, c;
        int expected;
        avg = (real'(hist[DELAY + 1]) + real'(hist[DELAY + 2])) / 2.0 / 16384.0;
        c = $floor(1023.0 * avg);
        if (c <= 0.0) begin expected = 0; clamp_lo++; end
        else if (c > 1023.0) begin expected = 1023; clamp_hi++; end
        else expected = int'(c);
        checks++;
        if (int'(channel) != expected) begin
          failures++;
          if (failures < 10) $display("n=%0d channel=%0d expected=%0d", n, channel, expected);
        end
      end
    end
    checks++;
    if (clamp_hi == 0 || clamp_lo == 0) begin
      failures++;
      $display("clamping not exercised (%0d high, %0d low)", clamp_hi, clamp_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
