// mca: multichannel analyzer, from trapezoid samples to a streamed spectrum.
//
// Four parts in a row. mca_fall_detector finds the start of each trapezoid's
// falling edge from the sign of a low-pass filtered derivative.
// mca_channel_converter delays the trapezoid by 320 samples, so that at the
// moment of detection it shows a sample near the end of the flat top, averages
// two samples and scales the height to a channel 0..1023. mca_maxima_capture
// takes that channel for one clock at the rising edge of the detection, and
// mca_histogram adds one to the count of that channel and streams all
// (channel, count) pairs as 26-bit packets over AXI4-Stream.
//
// Timing: one trapezoid sample per clock. An event is counted about
// DELAY + 3 clocks after the flat-top sample it measured; the readout is
// independent of the counting and runs whenever TREADY allows.
module mca
  import spectro_pkg::*;
#(
  parameter int  DELAY = 320,     // trapezoid delay before the channel read-out
  parameter int  SPAN  = 10,      // derivative spread in samples
  parameter int  N1    = 2,       // derivative signs ANDed
  parameter real LPF_A = 0.001,   // derivative low-pass coefficient
  parameter real C_OFS = 0.0001   // derivative offset
) (
  input  logic        clk,
  input  logic        rst,
  input  tpz_t        v_tpz,
  output channel_t    maxima,         // event channel for one clock, else 0
  output logic        event_valid,    // maxima holds an event this clock
  output logic        ready,          // histogram cleared, counting
  output logic [15:0] dropped,        // events lost while clearing
  output logic [31:0] m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast
);

  logic     falling;
  channel_t channel;

  mca_fall_detector #(.SPAN(SPAN), .N1(N1), .LPF_A(LPF_A), .C_OFS(C_OFS)) u_part1 (
    .clk, .rst, .v_in(v_tpz), .falling
  );

  mca_channel_converter #(.DELAY(DELAY)) u_part2 (
    .clk, .rst, .v_in(v_tpz), .channel
  );

  mca_maxima_capture u_part3 (
    .clk, .rst, .falling, .channel, .maxima, .event_valid
  );

  mca_histogram #(.CHW(CH_W), .CNTW(CNT_W), .TDW(32)) u_part4 (
    .clk, .rst, .maxima, .ready, .dropped,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );

endmodule
