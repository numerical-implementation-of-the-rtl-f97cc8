// spectro_pkg: word formats and shared types of the gamma-ray spectrometer datapath.
//
// All datapath words are signed two's complement fixed-point numbers. A format
// written "W.F" below has W bits in total and F bits right of the binary point,
// so the value of a word x is x / 2**F. The formats follow the word-length
// analysis of the filter: 14.13 ADC samples, 23.23 beta, 25.23 inside the
// first two filter stages, 16.14 between stages two and three and at the filter
// output, 26.14 in the third stage accumulator, 18.18 for the 1/A constant.
// The MCA works on 10-bit channels and 16-bit counts, packed into 26-bit packets.
// The trace capture stores (input, trapezoid) sample pairs of 30 bits.
package spectro_pkg;

  // ADC sample, 14.13 (value range [-1, 1))
  localparam int ADC_W     = 14;
  localparam int ADC_FRAC  = 13;
  // beta coefficient, unsigned 23.23
  localparam int BETA_W    = 23;
  // stage 1 multiplier output, 24.23, and stage 1/2 word, 25.23
  localparam int MULT1_W   = 24;
  localparam int S1_W      = 25;
  localparam int S1_FRAC   = 23;
  // stage 2 output after conversion, 16.14
  localparam int S2_W      = 16;
  localparam int S2_FRAC   = 14;
  // stage 3 subtractor and accumulator, 26.14
  localparam int S3_W      = 26;
  // 1/A constant, unsigned 18.18
  localparam int INVA_W    = 18;
  // trapezoid output, 16.14
  localparam int TPZ_W     = 16;
  localparam int TPZ_FRAC  = 14;
  // delay-line RAM address width (depth 2**10)
  localparam int DLY_AW    = 10;
  // MCA channel and count widths
  localparam int CH_W      = 10;
  localparam int CNT_W     = 16;

  typedef logic signed [ADC_W-1:0] adc_t;
  typedef logic signed [S1_W-1:0]  s1_t;
  typedef logic signed [S2_W-1:0]  s2_t;
  typedef logic signed [S3_W-1:0]  s3_t;
  typedef logic signed [TPZ_W-1:0] tpz_t;
  typedef logic [CH_W-1:0]         channel_t;
  typedef logic [CNT_W-1:0]        count_t;

  // One histogram entry as sent to the processing system: channel in the
  // upper 10 bits, its count in the lower 16 bits (26 bits in all).
  typedef struct packed {
    channel_t channel;
    count_t   count;
  } mca_packet_t;

  localparam int PACKET_W = $bits(mca_packet_t);

  // One sample pair stored by the trace capture: the filter input and the
  // trapezoid of the same clock.
  typedef struct packed {
    adc_t vin;
    tpz_t vtpz;
  } trace_sample_t;

endpackage
