// tb_trace_capture: checks the single-pulse trace capture with a 64-pair RAM
// (AW = 6).
//
// The testbench drives trapezoids of chosen rise, flat top and height on
// `vtpz`, and a sample counter on `vin` so every stored pair is identifiable.
// It keeps its own list of the pairs that should be stored: those of the first
// pulse, from the first sample above the threshold to the last one before the
// trapezoid falls back to it. It checks
//  - `length` and every stored pair, read back through the read port with its
//    one-clock latency;
//  - that a second pulse arriving while a trace is held changes nothing;
//  - that `arm` starts a new capture of the next pulse;
//  - that a pulse longer than the RAM stops at 64 pairs (full);
//  - that nothing is captured while the trapezoid stays below the threshold.
module tb_trace_capture;
  import spectro_pkg::*;
  localparam int AW = 6;
  localparam int DEPTH = 2 ** AW;

  logic clk = 1'b0, rst = 1'b1, arm = 1'b0;
  tpz_t threshold = tpz_t'(16'sd1638);   // 0.1 in 16.14
  adc_t vin = '0;
  tpz_t vtpz = '0;
  logic done;
  logic [AW:0] length;
  logic [AW-1:0] rd_addr = '0;
  trace_sample_t rd_data;

  int checks = 0, failures = 0;
  int n_full = 0, n_ignored = 0, n_rearm = 0;
  trace_sample_t expected [$];
  int sample_no = 0;

  always #5 clk = ~clk;

  trace_capture #(.AW(AW)) dut (
    .clk, .rst, .arm, .threshold, .vin, .vtpz, .done, .length, .rd_addr, .rd_data
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one sample pair; `record` adds it to the expected trace if above threshold
  task automatic drive(input int v, input bit record, inout bit capturing);
    @(negedge clk);
    vtpz = tpz_t'(v);
    vin  = adc_t'(sample_no);
    sample_no++;
    if (record) begin
      if (v > int'(threshold) && expected.size() < DEPTH) begin
        if (capturing || expected.size() == 0) begin
          expected.push_back('{vin: vin, vtpz: vtpz});
          capturing = 1'b1;
        end
      end else if (expected.size() > 0) capturing = 1'b0;
    end
  endtask

  // trapezoid of `rise` samples per edge, `flat` top samples, `height` in LSB
  task automatic trapezoid(input int rise, input int flat, input int height, input bit record);
    automatic bit capturing = 1'b0;
    for (int k = 0; k < rise; k++)  drive(height * k / rise, record, capturing);
    for (int k = 0; k < flat; k++)  drive(height, record, capturing);
    for (int k = rise; k > 0; k--)  drive(height * k / rise, record, capturing);
    repeat (10) drive(0, 1'b0, capturing);
  endtask

  task automatic check_trace(input string what);
    checks++;
    if (!done || int'(length) != expected.size()) begin
      failures++;
      $display("%s: done=%0b length=%0d, expected %0d pairs", what, done, length, expected.size());
    end
    foreach (expected[k]) begin
      @(negedge clk) rd_addr = AW'(k);
      @(posedge clk); #1;
      checks++;
      if (rd_data != expected[k]) begin
        failures++;
        $display("%s: pair %0d is (%0d, %0d), expected (%0d, %0d)", what, k,
                 rd_data.vin, rd_data.vtpz, expected[k].vin, expected[k].vtpz);
      end
    end
  endtask

  task automatic rearm();
    @(negedge clk) arm = 1'b1;
    @(negedge clk) arm = 1'b0;
    expected.delete();
    n_rearm++;
    checks++;
    if (done || length != '0) begin
      failures++;
      $display("arm did not clear the trace");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // below threshold: nothing captured
    trapezoid(20, 10, 1500, 1'b0);
    checks++;
    if (done || length != '0) begin
      failures++;
      $display("captured a pulse below the threshold");
    end

    // first pulse captured, second ignored while held
    trapezoid(20, 10, 8000, 1'b1);
    check_trace("first pulse");
    trapezoid(15, 5, 12000, 1'b0);
    n_ignored++;
    check_trace("held over a second pulse");

    // re-arm: the next pulse replaces it
    rearm();
    trapezoid(8, 3, 16000, 1'b1);
    check_trace("after arm");

    // pulse longer than the RAM: stops full
    rearm();
    trapezoid(30, 40, 16000, 1'b1);
    if (length == (AW+1)'(DEPTH)) n_full++;
    check_trace("full RAM");

    $display("full %0d, ignored while held %0d, re-armed %0d", n_full, n_ignored, n_rearm);
    checks++;
    if (n_full == 0) begin failures++; $display("RAM never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
