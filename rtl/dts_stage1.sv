// dts_stage1: first stage of the trapezoidal shaper, the pole-zero canceller
//     I(n) = V(n) - beta * V(n-1),    H1(z) = 1 - beta z^-1.
// With beta = exp(-dt/tau_d) matched to the preamplifier decay, an exponential
// pulse becomes a single impulse.
//
// Word formats follow the filter's precision analysis: V is 14.13, beta is an
// unsigned 23.23 constant, the product is rounded to 24.23 and saturated, and the
// difference is kept at full precision, 25.23. Rounding is to nearest with ties
// away from zero, the rounding mode the design specifies for its multipliers.
//
// Timing: one result per clock, registered, so i_out(n+1) holds I(n) for the
// sample V(n) presented at din in clock n.
module dts_stage1
  import spectro_pkg::*;
#(
  // round(exp(-10 ns / 5 us) * 2**23): 10 ns sampling, 5 us decay time
  parameter logic [BETA_W-1:0] BETA = 23'd8371848
) (
  input  logic clk,
  input  logic rst,
  input  adc_t din,     // V(n), 14.13
  output s1_t  i_out    // I(n), 25.23
);

  localparam int PROD_W = ADC_W + BETA_W + 1;       // 38 bits, 36 fraction bits
  localparam int SHIFT  = ADC_FRAC + BETA_W - S1_FRAC; // 13: 36 -> 23 fraction bits

  adc_t                     v_prev;
  logic signed [PROD_W-1:0] prod, prod_rnd;
  logic signed [MULT1_W-1:0] prod_sat;
  s1_t                      v_ext;

  always_comb begin
    prod     = PROD_W'(v_prev) * $signed({1'b0, BETA});
    // round to nearest, ties away from zero
    prod_rnd = (prod + (PROD_W'(1) <<< (SHIFT - 1)) - ((prod < 0) ? PROD_W'(1) : PROD_W'(0))) >>> SHIFT;
    // saturate to 24.23
    if (prod_rnd > PROD_W'((1 <<< (MULT1_W - 1)) - 1))
      prod_sat = {1'b0, {(MULT1_W-1){1'b1}}};
    else if (prod_rnd < -PROD_W'(1 <<< (MULT1_W - 1)))
      prod_sat = {1'b1, {(MULT1_W-1){1'b0}}};
    else
      prod_sat = prod_rnd[MULT1_W-1:0];
    v_ext = s1_t'(din) <<< (S1_FRAC - ADC_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_prev <= '0;
      i_out  <= '0;
    end else begin
      v_prev <= din;
      i_out  <= v_ext - s1_t'(prod_sat);
    end
  end

endmodule
