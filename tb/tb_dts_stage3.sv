// tb_dts_stage3: checks the (A+B)-sample moving sum against a direct window sum
// of the last A+B inputs, and that a rectangle of A samples (the shape stage 2
// produces) becomes a trapezoid with A-sample edges and a B-sample flat top of
// height A times the rectangle. Output latency is one clock.
module tb_dts_stage3;
  import spectro_pkg::*;
  localparam int A = 300;
  localparam int B = 200;

  logic clk = 1'b0, rst = 1'b1;
  s2_t  r_in = '0;
  s3_t  t_out;
  int checks = 0, failures = 0, flat_len = 0, flats = 0;
  bit trap_phase = 1'b1;
  longint hist [$];
  longint ref_q [$];
  longint peak = 0;

  always #5 clk = ~clk;

  dts_stage3 #(.A(A), .B(B)) dut (.clk, .rst, .r_in, .t_out);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint value);
    longint s = 0;
    @(negedge clk);
    r_in = s2_t'(value);
    hist.push_front(value);
    if (hist.size() > A + B) void'(hist.pop_back());
    foreach (hist[k]) s += hist[k];
    ref_q.push_back(s);
    @(posedge clk); #1;
    begin
      longint e;
      e = ref_q.pop_front();
      checks++;
      if (longint'(t_out) != e) begin
        failures++;
        if (failures < 10) $display("T=%0d expected=%0d", t_out, e);
      end
      if (trap_phase) begin
        if (longint'(t_out) == peak && peak != 0) flat_len++;
        else if (flat_len != 0) begin
          flats++;
          checks++;
          if (flat_len != B + 1) begin   // B+1 samples at full height
            failures++;
            $display("flat top %0d samples, expected %0d", flat_len, B + 1);
          end
          flat_len = 0;
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // rectangles of 0.25 (4096 in 16.14), A samples long
    for (int p = 0; p < 2; p++) begin
      peak = longint'(A) * 4096;
      repeat (A) apply(4096);
      repeat (A + B + 20) apply(0);
    end
    trap_phase = 1'b0;
    for (int k = 0; k < 3000; k++) apply(longint'($urandom_range(65535)) - 32768);
    if (flats < 2) begin
      failures++;
      $display("only %0d flat tops seen", flats);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
