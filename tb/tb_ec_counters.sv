// tb_ec_counters: random dropped-carry patterns against a model of the three
// boundary counters (1-bit counters with overflow bit). Checks the overflow
// and non-zero flags and the correction term sum(count_k << 4(k+1)) each cycle,
// clearing whenever the model overflows, as the accumulator would; also the
// worked example value 0x220 for counts (C1, C0) = (2, 2).
module tb_ec_counters;

  int checks = 0, failures = 0;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [2:0]  inc;
  logic        clr, ovf, any;
  logic [15:0] term;
  int          m [3];
  bit          seen_220 = 0;

  ec_counters #(.AW(16), .NSEG(4), .CW(1)) dut (
    .clk(clk), .rst_n(rst_n), .inc(inc), .clr(clr), .ovf(ovf), .any(any), .term(term));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int et;
    bit eo, ea;
    inc = '0;
    clr = 1'b0;
    m = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // worked example first: two carries dropped at bits 4 and 8
    @(negedge clk);
    inc = 3'b011;
    m = '{1, 1, 0};
    @(negedge clk);
    m = '{2, 2, 0};
    @(negedge clk);
    inc = 3'b000;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // compare state
      et = 0; eo = 0; ea = 0;
      for (int k = 0; k < 3; k++) begin
        et += m[k] << (4 * (k + 1));
        eo |= (m[k] >= 2);
        ea |= (m[k] != 0);
      end
      checks++;
      if (term !== 16'(et) || ovf !== eo || any !== ea) begin
        failures++;
        $display("cyc %0d: term=%h ovf=%b any=%b exp %h %b %b", cyc, term, ovf, any, 16'(et), eo, ea);
      end
      if (m[0] == 2 && m[1] == 2 && m[2] == 0) begin
        seen_220 = 1;
        checks++;
        if (term !== 16'h0220) begin failures++; $display("example term %h", term); end
      end
      // next stimulus
      clr = eo || ($urandom_range(0, 40) == 0);
      inc = clr ? 3'($urandom) : (3'($urandom) & 3'($urandom));
      if (clr) begin
        m = '{0, 0, 0};
      end else begin
        for (int k = 0; k < 3; k++) m[k] += inc[k];
      end
    end
    checks++;
    if (!seen_220) begin failures++; $display("example state never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
