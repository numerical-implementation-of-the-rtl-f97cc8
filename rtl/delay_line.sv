// delay_line: long sample delay built as a RAM circular buffer.
//
// The filter needs delays of A and A+B samples (hundreds of samples), too long
// for a register chain, so a single-port RAM of 2**AW words is addressed by a
// counter that runs 0 .. len-1 and then reloads 0. Every clock the word at the
// counter address is read (read-before-write) and the new sample is written in
// its place, so a word comes back out exactly `len` clocks after it was written.
// The input register, the RAM output register and the output register add three
// clocks, which gives a total delay of len + 3 clocks:
//     dout(n) = din(n - (len + 3)).
// As in the design this follows, the length constant is therefore programmed as
// the wanted delay minus 3 (A-3 and A+B-3 in the filter).
//
// Until the counter has wrapped once, the RAM holds no written samples, and the
// output is forced to zero. This gives the same behaviour as a RAM initialised
// to zero, without a clearing pass. `len` is expected to stay constant after
// reset; 0 is treated as 1.
module delay_line #(
  parameter int W  = 16,   // data width
  parameter int AW = 10    // address width, RAM depth 2**AW
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [AW-1:0]       len,   // circular buffer length; total delay len+3
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  logic signed [W-1:0] mem [2**AW];
  logic signed [W-1:0] din_q, rd_q;
  logic [AW-1:0]       addr;
  logic                primed, rd_ok;

  // RAM port: read-before-write at the counter address
  always_ff @(posedge clk) begin
    rd_q      <= mem[addr];
    mem[addr] <= din_q;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr   <= '0;
      primed <= 1'b0;
      rd_ok  <= 1'b0;
      din_q  <= '0;
      dout   <= '0;
    end else begin
      din_q <= din;
      if (addr + 1'b1 >= len || addr == {AW{1'b1}}) begin
        addr   <= '0;
        primed <= 1'b1;
      end else begin
        addr <= addr + 1'b1;
      end
      rd_ok <= primed;
      dout  <= rd_ok ? rd_q : '0;
    end
  end

endmodule
