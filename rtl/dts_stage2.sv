// dts_stage2: second stage of the trapezoidal shaper, a moving sum of A samples
//     R(n) = R(n-1) + I(n) - I(n-A),    H(z) = (1 - z^-A) / (1 - z^-1).
// It turns the impulse from stage 1 into a rectangle A samples long.
//
// I(n-A) comes from a RAM delay line programmed with A-3 (the delay line adds
// three clocks of its own). The subtractor and accumulator are 25.23 and wrap on
// overflow, as the precision analysis prescribes; the delayed copy is kept at the
// full 25.23 width so that the wrap-around sum is exact and cannot drift. The
// accumulator is then rounded to 16.14 (to nearest, ties away from zero, wrap)
// for stage 3.
//
// Timing: accumulator register plus conversion register, so r_out(n+2) holds
// R(n) for the I(n) presented in clock n. One sample per clock.
module dts_stage2
  import spectro_pkg::*;
#(
  parameter int A = 300   // trapezoid rise time in samples (3 us at 10 ns)
) (
  input  logic clk,
  input  logic rst,
  input  s1_t  i_in,    // I(n), 25.23
  output s2_t  r_out    // R(n), 16.14
);

  localparam int DROP = S1_FRAC - S2_FRAC;   // 9 fraction bits removed

  s1_t i_dly, diff, acc;
  logic signed [S1_W:0] acc_rnd;

  delay_line #(.W(S1_W), .AW(DLY_AW)) u_dly (
    .clk (clk),
    .rst (rst),
    .len (DLY_AW'(A - 3)),
    .din (i_in),
    .dout(i_dly)
  );

  always_comb begin
    diff    = i_in - i_dly;                                       // 25.23, wraps
    // round to nearest, ties away from zero
    acc_rnd = ((S1_W+1)'(acc) + (S1_W+1)'(1 <<< (DROP - 1)) - ((acc < 0) ? (S1_W+1)'(1) : (S1_W+1)'(0))) >>> DROP;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      r_out <= '0;
    end else begin
      acc   <= acc + diff;                                        // 25 bits, wraps
      r_out <= acc_rnd[S2_W-1:0];                                 // 16.14, wraps
    end
  end

endmodule
