// mca_histogram: channel histogram and its readout (MCA part 4).
//
// A dual-port RAM holds one count per channel. Port A counts: each event
// (a non-zero channel from mca_maxima_capture) is a read-modify-write of its
// channel, the read in the event's clock and the write of count+1 in the next,
// so the address is held for two clocks. Counts saturate at 2**CNT_W - 1 (the
// saturation is this implementation's choice). Port B only reads: a channel
// counter scans the RAM, and each channel with its count is packed into one
// 26-bit packet {channel[9:0], count[15:0]} sent as an AXI4-Stream master beat,
// in TDATA[25:0] of a 32-bit TDATA (upper bits zero). TLAST marks the last
// channel of a scan; scanning then restarts at channel 0, so the receiver sees
// the live spectrum over and over.
//
// After reset the RAM is cleared by writing zero to every channel through
// port A, which takes 2**CH_W clocks; `ready` is low meanwhile and events are
// dropped (counted in `dropped`). Two events must be at least two clocks apart,
// which mca_maxima_capture guarantees (an event needs a low-then-high edge).
//
// Timing: port B reads have one clock of latency. After the scan address
// changes, one clock lets the read complete, the next loads the beat, and the
// scan advances when TVALID and TREADY are both high: at best one packet per
// three clocks, 3 * 1024 clocks per spectrum.
module mca_histogram
  import spectro_pkg::*;
#(
  parameter int CHW  = CH_W,    // channel bits: 2**CHW channels
  parameter int CNTW = CNT_W,   // count bits
  parameter int TDW  = 32       // AXI4-Stream TDATA width
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [CHW-1:0]  maxima,          // event channel, 0 = no event
  output logic            ready,           // clearing done, counting enabled
  output logic [15:0]     dropped,         // events lost while clearing
  // AXI4-Stream master
  output logic [TDW-1:0]  m_axis_tdata,
  output logic            m_axis_tvalid,
  input  logic            m_axis_tready,
  output logic            m_axis_tlast
);

  localparam int DEPTH = 1 << CHW;
  localparam logic [CNTW-1:0] CNT_MAX = '1;

  logic [CNTW-1:0] mem [DEPTH];

  // ---- port A: clear, then read-modify-write counting
  logic [CHW-1:0]  clr_addr;
  logic            rmw_pend;
  logic [CHW-1:0]  rmw_addr;
  logic [CNTW-1:0] qa;
  logic            we_a;
  logic [CHW-1:0]  wa;
  logic [CNTW-1:0] wd;
  logic            ev;

  assign ev = (maxima != '0);

  always_comb begin
    if (!ready) begin
      we_a = 1'b1;
      wa   = clr_addr;
      wd   = '0;
    end else begin
      we_a = rmw_pend;
      wa   = rmw_addr;
      wd   = (qa == CNT_MAX) ? qa : qa + 1'b1;
    end
  end

  // ---- port B: scan and stream
  typedef enum logic [1:0] {RD_IDLE, RD_WAIT, RD_READ, RD_SEND} rd_state_t;
  rd_state_t       rd_state;
  logic [CHW-1:0]  scan_ch;
  logic [CNTW-1:0] qb;

  // RAM: one write/read port (A) and one read port (B)
  always_ff @(posedge clk) begin
    if (we_a) mem[wa] <= wd;
    qa <= mem[maxima];
    qb <= mem[scan_ch];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready    <= 1'b0;
      clr_addr <= '0;
      rmw_pend <= 1'b0;
      rmw_addr <= '0;
      dropped  <= '0;
    end else begin
      if (!ready) begin
        clr_addr <= clr_addr + 1'b1;
        if (clr_addr == CHW'(DEPTH - 1)) ready <= 1'b1;
        if (ev && dropped != 16'hFFFF) dropped <= dropped + 1'b1;
        rmw_pend <= 1'b0;
      end else begin
        rmw_pend <= ev;
        rmw_addr <= maxima;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_state      <= RD_IDLE;
      scan_ch       <= '0;
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
    end else begin
      unique case (rd_state)
        RD_IDLE: if (ready) rd_state <= RD_WAIT;
        RD_WAIT: rd_state <= RD_READ;   // port B reads mem[scan_ch]
        RD_READ: begin
          // qb now holds mem[scan_ch]
          m_axis_tvalid <= 1'b1;
          m_axis_tdata  <= TDW'({scan_ch, qb});
          m_axis_tlast  <= (scan_ch == CHW'(DEPTH - 1));
          rd_state      <= RD_SEND;
        end
        RD_SEND: if (m_axis_tready) begin
          m_axis_tvalid <= 1'b0;
          m_axis_tlast  <= 1'b0;
          scan_ch       <= scan_ch + 1'b1;
          rd_state      <= RD_WAIT;
        end
        default: rd_state <= RD_IDLE;
      endcase
    end
  end

  // Two events may not be closer than two clocks (read-modify-write window).
  assert property (@(posedge clk) disable iff (rst) ev |=> !ev)
    else $error("mca_histogram: events in consecutive clocks");
  // AXI4-Stream: once offered, a beat stays valid and stable until accepted.
  assert property (@(posedge clk) disable iff (rst)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata))
    else $error("mca_histogram: TVALID or TDATA changed before TREADY");

endmodule
