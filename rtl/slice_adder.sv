// slice_adder: one W-bit slice of the segmented accumulator adder.
//
// Computes s = a + b + cin and the carry out of the slice. The slice may be built
// as a ripple-carry adder (a chain of full adders) or as a Kogge-Stone
// parallel-prefix adder; both architectures are the ones the design was
// evaluated with, and the segmentation scheme works with either. The
// Kogge-Stone form is the textbook one (generate/propagate pairs combined over
// log2(W) levels at distances 1, 2, 4, ...), with the carry in applied after
// the prefix tree.
//
// Interface: a, b, cin in; s, cout out. Purely combinational.
module slice_adder
  import mf_pkg::*;
#(
  parameter int unsigned W    = 4,
  parameter adder_arch_e ARCH = ARCH_RCA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  if (ARCH == ARCH_RCA) begin : g_rca
    logic [W:0] c;
    assign c[0] = cin;
    for (genvar i = 0; i < W; i++) begin : g_fa
      assign s[i]   = a[i] ^ b[i] ^ c[i];
      assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
    assign cout = c[W];
  end else begin : g_ks
    localparam int unsigned L = (W > 1) ? $clog2(W) : 0;
    logic [W-1:0] g [L+1];
    logic [W-1:0] p [L+1];
    logic [W:0]   c;
    assign g[0] = a & b;
    assign p[0] = a ^ b;
    for (genvar l = 1; l <= L; l++) begin : g_lvl
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (i >= D) begin : g_op
          assign g[l][i] = g[l-1][i] | (p[l-1][i] & g[l-1][i-D]);
          assign p[l][i] = p[l-1][i] & p[l-1][i-D];
        end else begin : g_pass
          assign g[l][i] = g[l-1][i];
          assign p[l][i] = p[l-1][i];
        end
      end
    end
    assign c[0] = cin;
    for (genvar i = 0; i < W; i++) begin : g_sum
      assign c[i+1] = g[L][i] | (p[L][i] & cin);
      assign s[i]   = p[0][i] ^ c[i];
    end
    assign cout = c[W];
  end

endmodule
