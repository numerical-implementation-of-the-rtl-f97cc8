// trapezoidal_filter: digital trapezoidal shaper for preamplifier pulses.
//
// The transfer function
//     H(z) = (1 - beta z^-1) (1 - z^-A)/(1 - z^-1) (1 - z^-(A+B))/(1 - z^-1) z^-1/A
// turns an exponential pulse E*beta^n into a symmetric trapezoid of height E,
// with A-sample edges and a B-sample flat top. It is split into four cascaded
// recursive stages: pole-zero cancellation (dts_stage1), an A-sample moving sum
// (dts_stage2), an (A+B)-sample moving sum (dts_stage3) and the 1/A gain
// (dts_stage4). Defaults are the design point of 10 ns sampling, 5 us decay,
// 3 us rise and 2 us flat top: A = 300, B = 200, beta = exp(-0.002).
//
// Timing: one 14.13 sample in and one 16.14 sample out per clock. The stages
// hold 1 + 2 + 1 + 2 = 6 registers, one of which is the z^-1 of the transfer
// function: if V(n) is on vin in clock n, vout in clock n+6 is T(n)/A, which
// is V_TPZ(n+1) of the recursions.
module trapezoidal_filter
  import spectro_pkg::*;
#(
  parameter int               A    = 300,
  parameter int               B    = 200,
  parameter logic [BETA_W-1:0] BETA = 23'd8371848
) (
  input  logic clk,
  input  logic rst,
  input  adc_t vin,
  output tpz_t vout
);

  s1_t i_n;
  s2_t r_n;
  s3_t t_n;

  dts_stage1 #(.BETA(BETA)) u_s1 (.clk, .rst, .din(vin), .i_out(i_n));
  dts_stage2 #(.A(A))       u_s2 (.clk, .rst, .i_in(i_n), .r_out(r_n));
  dts_stage3 #(.A(A), .B(B)) u_s3 (.clk, .rst, .r_in(r_n), .t_out(t_n));
  dts_stage4 #(.A(A))       u_s4 (.clk, .rst, .t_in(t_n), .v_out(vout));

endmodule
