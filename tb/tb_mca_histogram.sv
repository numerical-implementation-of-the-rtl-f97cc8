// tb_mca_histogram: runs the histogram with 16 channels and 4-bit counts so
// that saturation is reachable. It checks that events during the clearing
// pass are dropped and counted, that random events (at least two clocks apart)
// are counted per channel with saturation at 15, and that a full readout scan
// under random TREADY back-pressure delivers every channel once, in order,
// with its count, packed as {channel, count}, with TLAST on the last channel.
module tb_mca_histogram;
  localparam int CHW = 4, CNTW = 4, TDW = 32;
  localparam int NCH = 1 << CHW;

  logic clk = 1'b0, rst = 1'b1;
  logic [CHW-1:0] maxima = '0;
  logic ready;
  logic [15:0] dropped;
  logic [TDW-1:0] tdata;
  logic tvalid, tready = 1'b0, tlast;
  int checks = 0, failures = 0, stalls = 0, saturated = 0;
  int counts [NCH];

  always #5 clk = ~clk;

  mca_histogram #(.CHW(CHW), .CNTW(CNTW), .TDW(TDW)) dut (
    .clk, .rst, .maxima, .ready, .dropped,
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready), .m_axis_tlast(tlast)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fire(input int ch);
    @(negedge clk) maxima = CHW'(ch);
    @(negedge clk) maxima = '0;
  endtask

  // receive one full scan, starting at channel 0
  task automatic read_scan();
    int expect_ch = 0;
    bit started = 1'b0;
    while (1) begin
      @(negedge clk);
      tready = ($urandom_range(2) != 0);
      @(posedge clk);
      if (tvalid && !tready) stalls++;
      if (tvalid && tready) begin
        int ch, cnt;
        ch  = int'(tdata[CNTW +: CHW]);
        cnt = int'(tdata[CNTW-1:0]);
        if (!started && ch != 0) continue;      // wait for the start of a scan
        started = 1'b1;
        checks++;
        if (ch != expect_ch || cnt != counts[ch] || tlast != (ch == NCH - 1) ||
            tdata[TDW-1:CHW+CNTW] != '0) begin
          failures++;
          $display("beat ch=%0d cnt=%0d last=%0b, expected ch=%0d cnt=%0d",
                   ch, cnt, tlast, expect_ch, counts[expect_ch]);
        end
        expect_ch++;
        if (ch == NCH - 1) break;
      end
    end
    @(negedge clk) tready = 1'b0;
  endtask

  initial begin
    foreach (counts[k]) counts[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // events while the RAM is being cleared are dropped
    fire(3);
    fire(5);
    wait (ready);
    checks++;
    if (dropped != 16'd2) begin failures++; $display("dropped=%0d, expected 2", dropped); end
    read_scan();                                 // all zero after clearing
    // random events, two to four clocks apart; channel 7 gets enough to saturate
    for (int k = 0; k < 400; k++) begin
      int ch;
      ch = (k % 4 == 0) ? 7 : int'($urandom_range(NCH - 1, 1));
      fire(ch);
      if (counts[ch] < (1 << CNTW) - 1) counts[ch]++;
      else saturated++;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    read_scan();
    read_scan();                                 // scans repeat
    checks += 2;
    if (saturated == 0) begin failures++; $display("saturation not reached"); end
    if (stalls == 0) begin failures++; $display("no back-pressure seen"); end
    $display("saturated events %0d, stalled beats %0d", saturated, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
