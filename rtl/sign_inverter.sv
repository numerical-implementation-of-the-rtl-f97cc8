// sign_inverter: optional polarity inversion of the ADC samples.
//
// Preamplifiers give either positive or negative pulses; the shaping filter is
// built for positive pulses, so a negative-polarity front end is handled by
// setting `invert`. With `invert` high the output is the two's complement
// negation of the input (bitwise NOT plus one, wrapping within the 14-bit word,
// so the most negative code maps to itself); with `invert` low the sample passes
// unchanged. The inversion rule is the one of the spectrometer design; the
// output register (one clock of latency) is this implementation's choice.
//
// Interface: one 14.13 sample per clock on `din`, result on `dout` one clock later.
module sign_inverter
  import spectro_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic invert,   // 1: negate the sample, 0: pass it through
  input  adc_t din,
  output adc_t dout
);

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= invert ? adc_t'(~din + 1'b1) : din;
  end

endmodule
