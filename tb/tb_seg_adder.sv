// tb_seg_adder: checks the segmented adder against an independent model.
// Each 4-bit slice adds its operands plus the carry of the slice below, unless
// the boundary below it is cut (seg bit set); a carry at a cut boundary must
// appear on `dropped`. With seg = 0 this is a + b modulo 2^16. Random operands
// and random segmentation masks (including all-cut and none-cut), both
// architectures,
// plus the operands of the worked segmentation example (0x0089 + 0x0048 gives
// 0x00C1 with a carry dropped into bit 4).
module tb_seg_adder;
  import mf_pkg::*;

  int checks = 0, failures = 0;

  logic [15:0] a, b, s_r, s_k;
  logic [2:0]  seg;
  logic [2:0]  d_r, d_k;

  seg_adder #(.AW(16), .NSEG(4), .ARCH(ARCH_RCA)) u_r (.a(a), .b(b), .seg(seg), .s(s_r), .dropped(d_r));
  seg_adder #(.AW(16), .NSEG(4), .ARCH(ARCH_KS))  u_k (.a(a), .b(b), .seg(seg), .s(s_k), .dropped(d_k));

  task automatic check_one();
    logic [15:0] es;
    logic [2:0]  ed;
    logic [4:0]  t;
    logic       c;
    c = 1'b0;
    ed = '0;
    for (int k = 0; k < 4; k++) begin
      t = 5'(a[k*4 +: 4]) + 5'(b[k*4 +: 4]) + 5'(c);
      es[k*4 +: 4] = t[3:0];
      c = t[4];
      if (k < 3 && seg[k]) begin
        ed[k] = c;
        c = 1'b0;
      end
    end
    if (seg == 3'b000) begin
      checks++;
      if (es !== 16'(a + b)) begin failures++; $display("model: unsegmented sum wrong"); end
    end
    checks++;
    if (s_r !== es || d_r !== ed || s_k !== es || d_k !== ed) begin
      failures++;
      $display("mismatch seg=%b a=%h b=%h rca=%h/%b ks=%h/%b exp=%h/%b", seg, a, b, s_r, d_r, s_k, d_k, es, ed);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'h0089; b = 16'h0048; seg = 3'b111; #1;
    check_one();
    checks++;
    if (s_r !== 16'h00C1 || d_r !== 3'b001) begin
      failures++;
      $display("example mismatch: %h %b", s_r, d_r);
    end
    for (int i = 0; i < 5000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      seg = 3'($urandom);
      #1;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
