// tb_delay_line: feeds random words into three delay lines (length constants
// 1, 57 and the filter's 297) and checks every output against a software
// history: dout(n) = din(n - len - 3), and zero before that many samples exist.
module tb_delay_line;
  localparam int W = 25;
  localparam int NL = 3;
  localparam int LENS [NL] = '{1, 57, 297};

  logic clk = 1'b0, rst = 1'b1;
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout [NL];
  logic signed [W-1:0] hist [$];
  int checks = 0, failures = 0, n = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NL; g++) begin : g_dut
    delay_line #(.W(W), .AW(10)) dut (
      .clk, .rst, .len(10'(LENS[g])), .din, .dout(dout[g])
    );
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (n = 0; n < 3000; n++) begin
      din = W'($urandom);
      hist.push_front(din);           // hist[k] = din(n - k)
      @(posedge clk); #1;
      @(negedge clk);
      for (int g = 0; g < NL; g++) begin
        int d;
        logic signed [W-1:0] expected;
        // dout now shows the sample of LENS[g] + 3 - 1 clocks before the newest
        d = LENS[g] + 3 - 1;
        expected = (d < hist.size()) ? hist[d] : '0;
        checks++;
        if (dout[g] !== expected) begin
          failures++;
          if (failures < 10) $display("len=%0d n=%0d out=%0d expected=%0d", LENS[g], n, dout[g], expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
