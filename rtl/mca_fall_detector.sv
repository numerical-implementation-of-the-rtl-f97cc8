// mca_fall_detector: detects the falling edge of the trapezoid (MCA part 1).
//
// The pulse height is read near the end of the flat top, so the MCA must know
// when the trapezoid starts to fall. This block forms a spread derivative
//     d(n) = V(n) - V(n-SPAN)            (SPAN = 10 samples)
// passes it through a first-order low-pass filter
//     y(n) = y(n-1) + a * (d(n) - y(n-1))   (a = 0.001)
// and takes the sign bit of y(n) + c, where the small offset c = 0.0001 keeps
// noise on the flat top from looking like a fall. The sign bits of N1 = 2
// successive samples are ANDed; `falling` is high while all of them are
// negative. The spread derivative, the low-pass filter, the offset, the sign
// bit and the AND follow the spectrometer design; the filter form y += a(d-y),
// the word lengths (y is 34.30) and the fixed-point rounding of a and c
// (a = round(0.001 * 2**18) / 2**18, c = round(1e-4 * 2**30) / 2**30) are
// choices of this implementation.
//
// Timing: one sample per clock; `falling` is the AND of N1 registered sign
// bits (N1 >= 2).
module mca_fall_detector
  import spectro_pkg::*;
#(
  parameter int  SPAN  = 10,      // derivative spread in samples
  parameter int  N1    = 2,       // samples ANDed
  parameter real LPF_A = 0.001,   // low-pass filter coefficient a
  parameter real C_OFS = 0.0001   // offset c added before the sign test
) (
  input  logic clk,
  input  logic rst,
  input  tpz_t v_in,      // trapezoid, 16.14
  output logic falling    // all N1 filtered derivatives negative
);

  localparam int Y_FRAC = 30;
  localparam int Y_W    = 34;
  localparam int A_FRAC = 18;
  localparam logic [A_FRAC-1:0] A_Q = A_FRAC'(longint'(LPF_A * 2.0 ** A_FRAC));
  localparam logic signed [Y_W-1:0] C_Q = Y_W'(longint'(C_OFS * 2.0 ** Y_FRAC));

  typedef logic signed [Y_W-1:0] y_t;

  tpz_t                     hist [SPAN];
  logic signed [TPZ_W:0]    d;
  y_t                       y, d_ext, y_ofs;
  logic signed [Y_W:0]      err;
  logic signed [Y_W+A_FRAC+1:0] step_full;
  y_t                       step;
  logic [N1-1:0]            neg_hist;

  always_comb begin
    d         = (TPZ_W+1)'(v_in) - (TPZ_W+1)'(hist[SPAN-1]);
    d_ext     = y_t'(d) <<< (Y_FRAC - TPZ_FRAC);
    err       = (Y_W+1)'(d_ext) - (Y_W+1)'(y);
    step_full = (Y_W+A_FRAC+2)'(err) * $signed({1'b0, A_Q});
    step      = y_t'(step_full >>> A_FRAC);
    y_ofs     = y + C_Q;
  end

  assign falling = &neg_hist;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < SPAN; k++) hist[k] <= '0;
      y        <= '0;
      neg_hist <= '0;
    end else begin
      hist[0] <= v_in;
      for (int k = 1; k < SPAN; k++) hist[k] <= hist[k-1];
      y        <= y + step;
      neg_hist <= {neg_hist[N1-2:0], y_ofs[Y_W-1]};
    end
  end

endmodule
