// tb_dsec_accumulator: checks the DSEC accumulator.
//  1. The worked segmentation example: addends 89, 48, 54, A5, 43, 9F, 61 (hex)
//     in segmented mode. The segmented sums must be 0000, 0089, 00C1, 0015,
//     00BA, 00FD, 008C; at 008C both counters stand at 2, so the next three
//     cycles take no addend (overflow cycle plus a two-cycle correction) and
//     the sum becomes 0x008C + 0x220 = 0x02AC before 61 is taken.
//  2. Random addends, random gaps, random segmentation masks, random flushes on
//     the default 16-bit unit and on a 32-bit unit with 2-bit counters and
//     Kogge-Stone slices: whenever the unit reports `exact`, the sum must equal
//     the true sum of the addends taken (modulo 2^AW); every stall must last
//     exactly three cycles; with segmentation off no addend is ever refused.
module tb_dsec_accumulator;
  import mf_pkg::*;

  int checks = 0, failures = 0;
  int n_corr = 0, n_inexact = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // 16-bit unit (defaults)
  logic [2:0]  seg_en, seg2;
  logic        clear, add_valid, add_ready, flush, exact, busy;
  logic [15:0] addend, sum;
  dsec_accumulator dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .seg_en(seg_en), .add_valid(add_valid),
    .add_ready(add_ready), .addend(addend), .flush(flush), .sum(sum), .exact(exact),
    .corr_busy(busy));

  // 32-bit unit, 2-bit counters, Kogge-Stone
  logic        clear2, v2, r2, fl2, ex2, busy2;
  logic [31:0] ad2, sum2;
  dsec_accumulator #(.AW(32), .NSEG(4), .CW(2), .ARCH(ARCH_KS)) dut2 (
    .clk(clk), .rst_n(rst_n), .clear(clear2), .seg_en(seg2), .add_valid(v2),
    .add_ready(r2), .addend(ad2), .flush(fl2), .sum(sum2), .exact(ex2),
    .corr_busy(busy2));

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t: %s", $time, msg);
    end
  endtask

  // ---------------------------------------------------------------- part 1
  task automatic worked_example();
    logic [15:0] adds [7] = '{16'h89, 16'h48, 16'h54, 16'hA5, 16'h43, 16'h9F, 16'h61};
    logic [15:0] exp_seg [7] = '{16'h0000, 16'h0089, 16'h00C1, 16'h0015, 16'h00BA, 16'h00FD, 16'h008C};
    int i = 0;
    clear = 1'b1; add_valid = 1'b0; flush = 1'b0; seg_en = 3'b111;
    @(negedge clk);
    clear = 1'b0;
    // cycles 1..7
    for (int cyc = 1; cyc <= 7; cyc++) begin
      add_valid = 1'b1;
      addend = adds[cyc-1];
      #1;
      chk(sum == exp_seg[cyc-1], $sformatf("example cycle %0d: sum %h exp %h", cyc, sum, exp_seg[cyc-1]));
      chk(add_ready == (cyc < 7), $sformatf("example cycle %0d: add_ready %b", cyc, add_ready));
      @(negedge clk);
    end
    // cycles 8, 9: correction, addend 61 still waiting
    for (int cyc = 8; cyc <= 9; cyc++) begin
      chk(!add_ready && busy, $sformatf("example cycle %0d: expected correction", cyc));
      @(negedge clk);
    end
    // cycle 10: corrected sum, 61 taken
    chk(sum == 16'h02AC, $sformatf("example cycle 10: sum %h exp 02AC", sum));
    chk(add_ready && exact, "example cycle 10: ready and exact expected");
    @(negedge clk);
    add_valid = 1'b0;
    flush = 1'b1;
    // 02AC + 0061 segmented = 020D with one carry dropped into bit 8
    chk(sum == 16'h020D, $sformatf("example cycle 11: sum %h exp 020D", sum));
    repeat (4) @(negedge clk);
    chk(exact && sum == 16'h030D, $sformatf("example flush: sum %h exp 030D", sum));
    flush = 1'b0;
  endtask

  // ---------------------------------------------------------------- part 2
  task automatic random_run(input int cycles);
    logic [15:0] true1;
    logic [31:0] true2;
    int stall1, stall2;
    true1 = '0; true2 = '0; stall1 = 0; stall2 = 0;
    clear = 1'b1; clear2 = 1'b1;
    add_valid = 1'b0; v2 = 1'b0; flush = 1'b0; fl2 = 1'b0;
    @(negedge clk);
    clear = 1'b0; clear2 = 1'b0;
    for (int c = 0; c < cycles; c++) begin
      // new stimulus unless an addend is still waiting
      if (!(add_valid && !add_ready)) begin
        add_valid = ($urandom_range(0, 3) != 0);
        addend = 16'($urandom_range(0, 255));
        flush = ($urandom_range(0, 15) == 0);
        if ($urandom_range(0, 63) == 0) seg_en = ($urandom_range(0, 2) == 0) ? 3'($urandom) : ~seg_en;
      end
      if (!(v2 && !r2)) begin
        v2 = ($urandom_range(0, 3) != 0);
        ad2 = 32'($urandom_range(0, 65535));
        fl2 = ($urandom_range(0, 15) == 0);
        if ($urandom_range(0, 63) == 0) seg2 = ($urandom_range(0, 2) == 0) ? 3'($urandom) : ~seg2;
      end
      #1;
      if (exact) chk(sum == true1, $sformatf("16-bit: exact sum %h exp %h", sum, true1));
      else n_inexact++;
      if (ex2) chk(sum2 == true2, $sformatf("32-bit: exact sum %h exp %h", sum2, true2));
      else n_inexact++;
      if (seg_en == 3'b000 && !flush && exact) chk(add_ready, "16-bit: refused addend in nominal mode");
      // stall lengths
      if (!add_ready) stall1++;
      else if (stall1 != 0) begin
        chk(stall1 == 3, $sformatf("16-bit: stall of %0d cycles", stall1));
        n_corr++;
        stall1 = 0;
      end
      if (!r2) stall2++;
      else if (stall2 != 0) begin
        chk(stall2 == 3, $sformatf("32-bit: stall of %0d cycles", stall2));
        n_corr++;
        stall2 = 0;
      end
      if (add_valid && add_ready) true1 += addend;
      if (v2 && r2) true2 += ad2;
      @(negedge clk);
    end
    add_valid = 1'b0; v2 = 1'b0; flush = 1'b1; fl2 = 1'b1;
    repeat (5) @(negedge clk);
    chk(exact && sum == true1, $sformatf("16-bit final: %h exp %h", sum, true1));
    chk(ex2 && sum2 == true2, $sformatf("32-bit final: %h exp %h", sum2, true2));
    flush = 1'b0; fl2 = 1'b0;
  endtask

  initial begin
    clear = 1'b0; clear2 = 1'b0; seg_en = 3'b000; seg2 = 3'b111;
    add_valid = 1'b0; v2 = 1'b0; flush = 1'b0; fl2 = 1'b0;
    addend = '0; ad2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    worked_example();
    for (int r = 0; r < 20; r++) random_run(500);
    chk(n_corr > 20, $sformatf("only %0d corrections seen", n_corr));
    chk(n_inexact > 100, "segmentation never left carries pending");
    $display("corrections=%0d inexact_cycles=%0d", n_corr, n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
