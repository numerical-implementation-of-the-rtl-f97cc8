// tb_dts_stage2: checks the A-sample moving sum. The reference keeps the last
// A inputs and adds them directly (no recursion), then rounds the 25.23 sum to
// 16.14 (to nearest, ties away from zero, 2**-14 LSB). Inputs are random bursts, isolated
// impulses (which must give a rectangle exactly A samples long) and silence.
// Output latency is two clocks.
module tb_dts_stage2;
  import spectro_pkg::*;
  localparam int A = 300;

  logic clk = 1'b0, rst = 1'b1;
  s1_t  i_in = '0;
  s2_t  r_out;
  int checks = 0, failures = 0, rect_len = 0, rect_seen = 0;
  bit impulse_phase = 1'b1;
  longint hist [$];
  longint ref_q [$];

  always #5 clk = ~clk;

  dts_stage2 #(.A(A)) dut (.clk, .rst, .i_in, .r_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint window_sum();
    longint s = 0;
    for (int k = 0; k < A && k < hist.size(); k++) s += hist[k];
    return s;
  endfunction

  task automatic apply(input longint value);
    longint s, expected;
    @(negedge clk);
    i_in = s1_t'(value);
    hist.push_front(value);
    if (hist.size() > A) void'(hist.pop_back());
    s = window_sum();
    // round to 14 fraction bits, ties away from zero
    expected = (s >= 0) ? (s + 256) / 512 : -((-s + 256) / 512);
    ref_q.push_back(expected);
    @(posedge clk); #1;
    if (ref_q.size() > 1) begin
      longint e;
      e = ref_q.pop_front();              // result of the previous input
      checks++;
      if (longint'(r_out) != e) begin
        failures++;
        if (failures < 10) $display("R=%0d expected=%0d", r_out, e);
      end
      if (!impulse_phase) ;
      else if (r_out != 0) rect_len++;
      else if (rect_len != 0) begin
        rect_seen++;
        if (rect_len != A) begin
          failures++;
          $display("rectangle %0d samples long, expected %0d", rect_len, A);
        end
        checks++;
        rect_len = 0;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    apply(0);
    // isolated impulses of 0.5 (in 25.23)
    for (int p = 0; p < 3; p++) begin
      apply(64'sd1 <<< 22);
      repeat (A + 50) apply(0);
    end
    impulse_phase = 1'b0;
    // random small values (sum stays inside the 25-bit range)
    for (int k = 0; k < 2000; k++) apply(longint'($urandom_range(65535)) - 32768);
    repeat (A + 10) apply(0);
    if (rect_seen < 3) begin
      failures++;
      $display("only %0d rectangles seen", rect_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
