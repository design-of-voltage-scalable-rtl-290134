// tb_budget_latch: the latch follows d while en is high and holds the last
// value once en is low, whatever d does then.
module tb_budget_latch;

  int checks = 0, failures = 0;
  logic        en;
  logic [15:0] d, q, held;

  budget_latch #(.W(16)) dut (.en(en), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b1;
    d  = 16'h1234;
    #1;
    for (int i = 0; i < 200; i++) begin
      en = 1'b1;
      d = 16'($urandom);
      #1;
      checks++;
      if (q !== d) begin failures++; $display("not transparent: d=%h q=%h", d, q); end
      held = d;
      en = 1'b0;
      #1;
      for (int k = 0; k < 3; k++) begin
        d = 16'($urandom);
        #1;
        checks++;
        if (q !== held) begin failures++; $display("not holding: held=%h q=%h", held, q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
