// mca_maxima_capture: picks the pulse height at the detected fall (MCA part 3).
//
// On the rising edge of `falling` (low in the previous clock, high now) the
// current channel from the channel converter is output for exactly one clock
// if it is above zero; at all other times the output is zero. The result is a
// one-clock pulse whose value is the measured maximum of the trapezoid, so
// channel 0 doubles as "no event". `event_valid` flags the same clock.
//
// Timing: registered, one clock after the rising edge is seen.
module mca_maxima_capture
  import spectro_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     falling,      // from mca_fall_detector
  input  channel_t channel,      // from mca_channel_converter
  output channel_t maxima,       // channel of the event, 0 otherwise
  output logic     event_valid   // maxima is an event this clock
);

  logic falling_q, hit;

  assign hit = falling && !falling_q && (channel != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      falling_q   <= 1'b0;
      maxima      <= '0;
      event_valid <= 1'b0;
    end else begin
      falling_q   <= falling;
      maxima      <= hit ? channel : '0;
      event_valid <= hit;
    end
  end

endmodule
