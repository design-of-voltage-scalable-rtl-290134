// tb_slice_adder: exhaustive check of one adder slice in both architectures.
// Every a, b, cin of a 4-bit slice is applied to a ripple-carry and a
// Kogge-Stone instance, and a 5-bit sum is compared with a + b + cin.
// A 7-bit Kogge-Stone slice is also checked on random operands (odd width,
// three prefix levels).
module tb_slice_adder;
  import mf_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] a, b, s_rca, s_ks;
  logic       cin, co_rca, co_ks;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7;

  slice_adder #(.W(4), .ARCH(ARCH_RCA)) u_rca (.a(a), .b(b), .cin(cin), .s(s_rca), .cout(co_rca));
  slice_adder #(.W(4), .ARCH(ARCH_KS))  u_ks  (.a(a), .b(b), .cin(cin), .s(s_ks),  .cout(co_ks));
  slice_adder #(.W(7), .ARCH(ARCH_KS))  u_ks7 (.a(a7), .b(b7), .cin(ci7), .s(s7), .cout(co7));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] exp5;
    logic [7:0] exp8;
    for (int i = 0; i < 512; i++) begin
      {cin, a, b} = 9'(i);
      #1;
      exp5 = 5'(a) + 5'(b) + 5'(cin);
      checks += 2;
      if ({co_rca, s_rca} !== exp5) begin
        failures++;
        $display("RCA mismatch a=%h b=%h cin=%b got %h exp %h", a, b, cin, {co_rca, s_rca}, exp5);
      end
      if ({co_ks, s_ks} !== exp5) begin
        failures++;
        $display("KS mismatch a=%h b=%h cin=%b got %h exp %h", a, b, cin, {co_ks, s_ks}, exp5);
      end
    end
    for (int i = 0; i < 2000; i++) begin
      a7 = 7'($urandom);
      b7 = 7'($urandom);
      ci7 = 1'($urandom);
      #1;
      exp8 = 8'(a7) + 8'(b7) + 8'(ci7);
      checks++;
      if ({co7, s7} !== exp8) begin
        failures++;
        $display("KS7 mismatch a=%h b=%h cin=%b got %h exp %h", a7, b7, ci7, {co7, s7}, exp8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
