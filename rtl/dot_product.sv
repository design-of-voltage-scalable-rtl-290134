// dot_product: voltage-scalable dot-product unit.
//
// result = sum over the vector of a_i * b_i, for unsigned DW-bit elements.
// Datapath: input registers A and B, the Wallace-tree multiplier (first
// chained unit A1), the delay-budgeting latch, and the DSEC accumulator
// (second unit A2) feeding the DOT PRODUCT result register; see mf_shell for
// the element stream, the end-of-vector sequencing and the timing. Defaults:
// 8-bit elements, 32-bit accumulator in 4 slices of 8 bits, 1-bit carry
// counters; the slice count for 32 bits and the unsigned operands are this
// design's choices. A 32-bit sum is exact for up to 66051 elements.
//
// Controls: seg_en sets the degree of segmentation of the accumulator adder
// (one bit per slice boundary, 0 = nominal, all ones = fully segmented);
// latch_en is the budgeting latch enable (from db_enable_gen, or 1).
module dot_product
  import mf_pkg::*;
#(
  parameter int unsigned DW   = DATA_W,
  parameter int unsigned AW   = 32,
  parameter int unsigned NSEG = 4,
  parameter int unsigned CW   = 1,
  parameter adder_arch_e ARCH = ARCH_RCA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NSEG-2:0] seg_en,
  input  logic          latch_en,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_a,
  input  logic [DW-1:0] in_b,
  input  logic          in_last,
  output logic          out_valid,
  output logic [AW-1:0] result,
  output logic          corr_busy
);

  logic [DW-1:0]   a_q, b_q;
  logic [2*DW-1:0] prod;

  // A1: A * B
  multiplier #(.DW(DW)) u_mul (.a(a_q), .b(b_q), .p(prod));

  mf_shell #(.DW(DW), .PW(2*DW), .AW(AW), .NSEG(NSEG), .CW(CW), .ARCH(ARCH)) u_shell (
    .clk, .rst_n, .seg_en, .latch_en,
    .in_valid, .in_ready, .in_a, .in_b, .in_last,
    .a_q, .b_q, .a1_res(prod),
    .out_valid, .result, .corr_busy
  );

endmodule
