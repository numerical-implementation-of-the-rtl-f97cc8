// dts_stage3: third stage of the trapezoidal shaper, a moving sum of A+B samples
//     T(n) = T(n-1) + R(n) - R(n-(A+B)),    H(z) = (1 - z^-(A+B)) / (1 - z^-1).
// Summing the A-sample rectangle over A+B samples gives the trapezoid: a ramp
// of A samples, a flat top of B samples and a ramp down of A samples, with a
// height of A times the pulse amplitude.
//
// R(n-(A+B)) comes from a RAM delay line programmed with A+B-3. The subtractor
// and accumulator are 26.14 (16-bit input plus 10 bits of growth, since
// A+B < 2**10) and wrap on overflow.
//
// Timing: one accumulator register; t_out(n+1) holds T(n). One sample per clock.
module dts_stage3
  import spectro_pkg::*;
#(
  parameter int A = 300,  // rise time in samples
  parameter int B = 200   // flat-top duration in samples (2 us at 10 ns)
) (
  input  logic clk,
  input  logic rst,
  input  s2_t  r_in,    // R(n), 16.14
  output s3_t  t_out    // T(n), 26.14
);

  s2_t r_dly;
  s3_t diff;

  delay_line #(.W(S2_W), .AW(DLY_AW)) u_dly (
    .clk (clk),
    .rst (rst),
    .len (DLY_AW'(A + B - 3)),
    .din (r_in),
    .dout(r_dly)
  );

  assign diff = s3_t'(r_in) - s3_t'(r_dly);

  always_ff @(posedge clk) begin
    if (rst) t_out <= '0;
    else     t_out <= t_out + diff;
  end

endmodule
