// tb_clk_delay_line: measures the rising-edge delay of every tap of the clock
// delay chain model: tap i must rise (i+1) * 250 ps after the clock.
module tb_clk_delay_line;

  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [7:0] taps;
  realtime    t_clk;

  clk_delay_line #(.TAPS(8), .TAP_DELAY_PS(250)) dut (.clk(clk), .taps(taps));

  always #5 clk = ~clk;

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar i = 0; i < 8; i++) begin : g_mon
    always @(posedge taps[i]) begin
      realtime dly;
      dly = $realtime - t_clk;
      checks++;
      if (dly < (i + 1) * 0.25 - 0.001 || dly > (i + 1) * 0.25 + 0.001) begin
        failures++;
        $display("tap %0d delay %f ns", i, dly);
      end
    end
  end

  always @(posedge clk) t_clk = $realtime;

  initial begin
    repeat (10) @(posedge clk);
    #3;
    if (checks < 72) begin failures++; $display("too few tap edges: %0d", checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
