// trace_capture: records the filter input and the trapezoid of one pulse, for
// looking at the shaper's output on a PC.
//
// While armed, the block watches the trapezoid. The first sample above
// `threshold` starts a capture: from that clock on, every sample pair (filter
// input, trapezoid) is written to a RAM at consecutive addresses for as long as
// the trapezoid stays above the threshold. The capture ends at the first sample
// at or below the threshold, or when the RAM is full. The block then holds the
// trace, ignoring further pulses, until `arm` is pulsed. So it keeps one single
// pulse, and only the part of it above the threshold: the start of the input
// pulse and the low ends of the trapezoid's edges are not recorded.
//
// The reference design stores a single detected pulse above a threshold in a
// RAM and sends it to a PC. The threshold as a run-time input, the RAM depth,
// the armed-after-reset behaviour, the `arm` re-trigger and the random-access
// read port are this implementation's choices. The readout to the PC belongs to
// the processor, which reads the RAM through `rd_addr`/`rd_data`.
//
// Interface: `vin` is the 14.13 filter input and `vtpz` the 16.14 trapezoid,
// one pair per clock. `threshold` is 16.14 and compared as signed. `done` is
// high while a finished trace is held, and `length` is the number of pairs
// stored (0 .. 2**AW). `arm` (one clock) clears the trace and starts waiting for
// the next pulse; the block is also armed after reset.
//
// Timing: the pair presented in the clock where `vtpz` first exceeds the
// threshold is stored at address 0. `done` rises the clock after the last
// stored pair. `rd_data` follows `rd_addr` with one clock of latency.
module trace_capture
  import spectro_pkg::*;
#(
  parameter int AW = DLY_AW          // RAM address bits: 2**AW sample pairs
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                arm,
  input  tpz_t                threshold,
  input  adc_t                vin,
  input  tpz_t                vtpz,
  output logic                done,
  output logic [AW:0]         length,
  input  logic [AW-1:0]       rd_addr,
  output trace_sample_t       rd_data
);

  localparam int DEPTH = 2 ** AW;

  typedef enum logic [1:0] {ARMED, CAPTURE, HOLD} state_t;

  state_t          state;
  logic [AW:0]     count;
  logic            above, wr_en;
  trace_sample_t   mem [DEPTH];

  assign above  = vtpz > threshold;
  assign wr_en  = above && count < (AW+1)'(DEPTH) && (state == ARMED || state == CAPTURE);
  assign done   = state == HOLD;
  assign length = count;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ARMED;
      count <= '0;
    end else begin
      unique case (state)
        ARMED:   if (above) state <= CAPTURE;
        CAPTURE: if (!wr_en) state <= HOLD;
        HOLD:    ;
        default: state <= ARMED;
      endcase
      if (wr_en) count <= count + 1'b1;
      if (arm) begin
        state <= ARMED;
        count <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[count[AW-1:0]] <= '{vin: vin, vtpz: vtpz};
    rd_data <= mem[rd_addr];
  end

endmodule
