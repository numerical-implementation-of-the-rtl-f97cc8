// tb_mca_fall_detector: drives ideal trapezoids (A = 300 edges, B = 200 flat
// top, heights 0.1 to 1.0) with small random noise and a flat baseline, and
// compares `falling` with a floating-point model of the spread derivative,
// low-pass filter, offset and two-sample AND. Around a sign change the two
// may disagree for a few clocks because of fixed-point rounding, so each
// trapezoid is checked for exactly one rising edge of `falling`, no
// detection before the fall starts, and a detection time within 3 clocks
// of the model's. Flat stretches must never trigger.
module tb_mca_fall_detector;
  import spectro_pkg::*;
  localparam int A = 300, B = 200, GAP = 10000;  // 100 us pulse period

  logic clk = 1'b0, rst = 1'b1;
  tpz_t v_in = '0;
  logic falling;
  int checks = 0, failures = 0, cyc = 0;
  real hist [$];
  real y = 0.0;
  bit  neg_q = 1'b0;

  always #5 clk = ~clk;

  mca_fall_detector dut (.clk, .rst, .v_in, .falling);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns hardware and model detection flags after one sample
  task automatic step(input real v, output bit hw, output bit model);
    real d, vq;
    bit neg;
    int code;
    code = int'(v * 16384.0);
    vq = real'(code) / 16384.0;
    @(negedge clk);
    v_in = tpz_t'(code);
    hist.push_front(vq);
    if (hist.size() > 11) void'(hist.pop_back());
    d = vq - ((hist.size() > 10) ? hist[10] : 0.0);
    // register order of the hardware: y updated from the current d,
    // sign taken from the current (pre-update) y
    neg = (y + 0.0001) < 0.0;
    y = y + 0.001 * (d - y);
    model = neg && neg_q;
    neg_q = neg;
    @(posedge clk); #1;
    hw = falling;
    cyc++;
  endtask

  task automatic trapezoid(input real h);
    bit hw, model, hw_q = 0, model_q = 0;
    int hw_edges = 0, t_hw = -1, t_model = -1, t_fall;
    t_fall = A + B;
    for (int k = 0; k < GAP; k++) begin
      real v;
      if (k < A) v = h * real'(k) / A;
      else if (k < A + B) v = h;
      else if (k < 2 * A + B) v = h * real'(2 * A + B - k) / A;
      else v = 0.0;
      v += (real'($urandom_range(20)) - 10.0) / 16384.0 * 0.2;
      step(v, hw, model);
      if (hw && !hw_q) begin hw_edges++; if (t_hw < 0) t_hw = k; end
      if (model && !model_q && t_model < 0) t_model = k;
      hw_q = hw; model_q = model;
    end
    checks += 3;
    if (hw_edges != 1) begin
      failures++;
      $display("h=%f: %0d detections, expected 1", h, hw_edges);
    end
    if (t_hw < t_fall) begin
      failures++;
      $display("h=%f: detection at %0d before the fall at %0d", h, t_hw, t_fall);
    end
    if (t_hw - t_model > 3 || t_model - t_hw > 3) begin
      failures++;
      $display("h=%f: detection at %0d, model %0d", h, t_hw, t_model);
    end
    $display("h=%f: fall starts at %0d, detected at %0d (model %0d)", h, t_fall, t_hw, t_model);
  endtask

  initial begin
    bit hw, model;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // flat baseline: no detection
    for (int k = 0; k < 2000; k++) begin
      step(0.0, hw, model);
      checks++;
      if (hw) begin failures++; $display("detection on the baseline"); break; end
    end
    trapezoid(0.1);
    trapezoid(0.5);
    trapezoid(1.0);
    trapezoid(0.25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
