// tb_sign_inverter: checks the optional two's complement negation against
// integer arithmetic for random samples and both settings of `invert`,
// including the most negative code (which wraps to itself) and the one-clock
// latency.
module tb_sign_inverter;
  import spectro_pkg::*;

  logic clk = 1'b0, rst = 1'b1, invert = 1'b0;
  adc_t din = '0, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sign_inverter dut (.clk, .rst, .invert, .din, .dout);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int value, input logic inv);
    int expected;
    @(negedge clk);
    din    = adc_t'(value);
    invert = inv;
    @(posedge clk); #1;
    expected = inv ? -value : value;
    if (expected == 8192) expected = -8192;   // 14-bit wrap of -(-1.0)
    checks++;
    if (int'(dout) != expected) begin
      failures++;
      $display("mismatch: in=%0d inv=%0b out=%0d expected=%0d", value, inv, dout, expected);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    apply(-8192, 1'b1);
    apply(8191, 1'b1);
    apply(0, 1'b1);
    apply(-1, 1'b0);
    for (int k = 0; k < 2000; k++)
      apply(int'($urandom_range(16383)) - 8192, 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
