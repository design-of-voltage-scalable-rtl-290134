// tb_multiplier: exhaustive check of the Wallace-tree product a * b for all 8-bit operand pairs.
module tb_multiplier;

  int checks = 0, failures = 0;
  logic [7:0] a, b;
  logic [15:0] d;

  multiplier #(.DW(8)) dut (.a(a), .b(b), .p(d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        e = i * j;
        checks++;
        if (int'(d) != e) begin
          failures++;
          if (failures < 10) $display("mismatch a=%0d b=%0d got %0d exp %0d", i, j, d, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
