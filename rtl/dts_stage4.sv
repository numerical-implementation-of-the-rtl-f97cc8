// dts_stage4: last stage of the trapezoidal shaper, gain normalisation
//     V_TPZ(n) = T(n-1) / A,    H(z) = z^-1 / A.
// The trapezoid from stage 3 is A times too high; it is multiplied by the
// constant 1/A, held as an unsigned 18.18 number (round(2**18 / A)), and the
// product is rounded (to nearest, ties away from zero) and saturated to 16.14.
//
// Timing: a multiplier register and a one-clock delay, two clocks in all;
// v_out(n+2) holds T(n)/A. One sample per clock.
module dts_stage4
  import spectro_pkg::*;
#(
  parameter int A = 300
) (
  input  logic clk,
  input  logic rst,
  input  s3_t  t_in,    // T(n), 26.14
  output tpz_t v_out    // V_TPZ, 16.14
);

  localparam logic [INVA_W-1:0] INV_A = INVA_W'(((1 << INVA_W) + A / 2) / A);
  localparam int PROD_W = S3_W + INVA_W + 1;   // 45 bits, 32 fraction bits

  logic signed [PROD_W-1:0] prod, prod_rnd;
  tpz_t prod_sat, mult_q;

  always_comb begin
    prod     = PROD_W'(t_in) * $signed({1'b0, INV_A});
    // round to nearest, ties away from zero
    prod_rnd = (prod + (PROD_W'(1) <<< (INVA_W - 1)) - ((prod < 0) ? PROD_W'(1) : PROD_W'(0))) >>> INVA_W;
    if (prod_rnd > PROD_W'((1 <<< (TPZ_W - 1)) - 1))
      prod_sat = {1'b0, {(TPZ_W-1){1'b1}}};
    else if (prod_rnd < -PROD_W'(1 <<< (TPZ_W - 1)))
      prod_sat = {1'b1, {(TPZ_W-1){1'b0}}};
    else
      prod_sat = prod_rnd[TPZ_W-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mult_q <= '0;
      v_out  <= '0;
    end else begin
      mult_q <= prod_sat;
      v_out  <= mult_q;
    end
  end

endmodule
