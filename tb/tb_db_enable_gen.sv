// tb_db_enable_gen: with the delay chain model attached, the latch enable must
// be high from the clock's rising edge until the selected tap rises and low for
// the rest of the cycle; with db_en = 0 it must stay high. Samples are taken at
// fixed points in the cycle for every tap.
module tb_db_enable_gen;

  int checks = 0, failures = 0;
  logic       clk = 1'b0;
  logic [7:0] taps;
  logic [2:0] sel;
  logic       db_en, en;

  clk_delay_line #(.TAPS(8), .TAP_DELAY_PS(250)) u_dl (.clk(clk), .taps(taps));
  db_enable_gen  #(.TAPS(8)) dut (.clk(clk), .taps(taps), .tap_sel(sel), .db_en(db_en), .latch_en(en));

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_en(input logic e, input string what);
    checks++;
    if (en !== e) begin
      failures++;
      $display("t=%0t sel=%0d db_en=%b %s: en=%b", $time, sel, db_en, what, en);
    end
  endtask

  initial begin
    db_en = 1'b1;
    sel = '0;
    @(negedge clk);
    for (int s = 0; s < 8; s++) begin
      sel = 3'(s);
      @(posedge clk);
      #0.1;  expect_en(1'b1, "just after clock edge");
      #((s + 1) * 0.25 - 0.2); expect_en(1'b1, "just before tap");
      #0.2;  expect_en(1'b0, "just after tap");
      @(negedge clk);
      #1;    expect_en(1'b0, "low phase");
    end
    db_en = 1'b0;
    repeat (3) begin
      @(posedge clk);
      #3; expect_en(1'b1, "budgeting off, high phase");
      @(negedge clk);
      #3; expect_en(1'b1, "budgeting off, low phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
