// mca_channel_converter: turns the delayed trapezoid into a channel number
// (MCA part 2).
//
// The fall of the trapezoid is detected a fixed time after the flat top ends,
// so the trapezoid is delayed by DELAY = 320 samples to bring a flat-top sample
// back in line with the detection. The delayed stream is averaged over two
// successive samples and scaled by 2**CH_W - 1 = 1023; the integer part is the
// channel, so a trapezoid height of 0..1 maps to channels 0..1023. Negative
// averages give channel 0 and averages above 1 give channel 1023 (clamping is
// this implementation's choice, the design only states the 0..1023 range). The
// average is kept exact (the sum of the two samples is scaled, then shifted),
// and the integer part is taken by truncation.
//
// Timing: one sample per clock. The long delay is a RAM delay line programmed
// with DELAY-3; the average and the scaled channel take two more registers, so
// channel(n) = floor(1023 * (V(n-DELAY-2) + V(n-DELAY-3)) / 2), clamped.
module mca_channel_converter
  import spectro_pkg::*;
#(
  parameter int DELAY = 320
) (
  input  logic     clk,
  input  logic     rst,
  input  tpz_t     v_in,      // trapezoid, 16.14
  output channel_t channel    // 0 .. 1023
);

  localparam int SCALE = (1 << CH_W) - 1;
  localparam int SUM_W = TPZ_W + 1;          // sum of two samples, 17.14
  localparam int MUL_W = SUM_W + CH_W + 1;   // 28 bits

  tpz_t v_dly, v_prev;
  logic signed [SUM_W-1:0] sum_q;
  logic signed [MUL_W-1:0] scaled, ch_full;

  delay_line #(.W(TPZ_W), .AW(DLY_AW)) u_dly (
    .clk (clk),
    .rst (rst),
    .len (DLY_AW'(DELAY - 3)),
    .din (v_in),
    .dout(v_dly)
  );

  always_comb begin
    scaled  = MUL_W'(sum_q) * MUL_W'(SCALE);
    // sum has 14 fraction bits and is twice the average: shift by 15
    ch_full = scaled >>> (TPZ_FRAC + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_prev  <= '0;
      sum_q   <= '0;
      channel <= '0;
    end else begin
      v_prev <= v_dly;
      sum_q  <= SUM_W'(v_dly) + SUM_W'(v_prev);
      if (sum_q <= 0)                  channel <= '0;
      else if (ch_full > MUL_W'(SCALE)) channel <= channel_t'(SCALE);
      else                             channel <= ch_full[CH_W-1:0];
    end
  end

endmodule
