// spectrometer_top: programmable-logic part of a digital gamma-ray spectrometer.
//
// A 14-bit ADC digitises the preamplifier output, an exponentially decaying
// pulse whose height is proportional to the energy of the detected photon.
// This block registers the ADC code, optionally inverts its sign (for
// negative-polarity preamplifiers), shapes each pulse into a trapezoid whose
// flat top equals the pulse height, measures that height, converts it to one of
// 1024 channels and counts the pulses per channel. The spectrum is streamed out
// as (channel, count) packets over AXI4-Stream to the processor that forwards
// it to a display.
//
// Interface: `adc_data` is a two's complement 14-bit code, read as a 14.13
// fraction in [-1, 1), one sample per clock (10 ns at the default parameters).
// `invert` selects the sign inversion. The trapezoid (16.14) and the event
// channel are brought out for observation. The ADC and its analogue front end,
// the clock generator and the processor are outside this block.
// A trace capture beside the MCA keeps the filter input and the trapezoid of
// one pulse above `trace_threshold` for display; the processor reads it through
// `trace_rd_addr`/`trace_rd_data` and re-arms it with `trace_arm`.
//
// Timing: ADC register 1 clock, sign inverter 1, trapezoidal filter 6, so the
// trapezoid appears 8 clocks after the sample; events follow about 330 clocks
// after the flat-top sample they measure (see mca).
module spectrometer_top
  import spectro_pkg::*;
#(
  parameter int               A     = 300,         // rise time, samples
  parameter int               B     = 200,         // flat top, samples
  parameter logic [BETA_W-1:0] BETA  = 23'd8371848, // round(exp(-10ns/5us) * 2**23)
  parameter int               DELAY = 320          // MCA read-out delay, samples
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [ADC_W-1:0] adc_data,
  input  logic        invert,
  output tpz_t        v_tpz,
  output channel_t    maxima,
  output logic        event_valid,
  output logic        mca_ready,
  output logic [15:0] dropped,
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  // trace capture of a single pulse
  input  logic        trace_arm,
  input  tpz_t        trace_threshold,
  output logic        trace_done,
  output logic [DLY_AW:0]   trace_length,
  input  logic [DLY_AW-1:0] trace_rd_addr,
  output trace_sample_t     trace_rd_data
);

  adc_t adc_q, v_in;

  always_ff @(posedge clk) begin
    if (rst) adc_q <= '0;
    else     adc_q <= adc_t'(adc_data);
  end

  sign_inverter u_inv (.clk, .rst, .invert, .din(adc_q), .dout(v_in));

  trapezoidal_filter #(.A(A), .B(B), .BETA(BETA)) u_dts (
    .clk, .rst, .vin(v_in), .vout(v_tpz)
  );

  mca #(.DELAY(DELAY)) u_mca (
    .clk, .rst, .v_tpz, .maxima, .event_valid, .ready(mca_ready), .dropped,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );

  trace_capture u_trace (
    .clk, .rst, .arm(trace_arm), .threshold(trace_threshold), .vin(v_in), .vtpz(v_tpz),
    .done(trace_done), .length(trace_length), .rd_addr(trace_rd_addr), .rd_data(trace_rd_data)
  );

endmodule
