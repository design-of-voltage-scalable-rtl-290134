// l1_norm: voltage-scalable L1-norm (sum of absolute differences) unit.
//
// result = sum over the vector of |a_i - b_i|, for unsigned DW-bit elements.
// Datapath: input registers A and B, the absolute-difference unit (first
// chained unit A1), the delay-budgeting latch, and the DSEC accumulator
// (second unit A2) feeding the L1-NORM result register; see mf_shell for the
// element stream, the end-of-vector sequencing and the timing. The defaults
// (8-bit elements, 16-bit accumulator in 4 slices of 4 bits, 1-bit carry
// counters) are those of the worked example of the segmentation scheme.
// A 16-bit sum is exact for up to 257 elements of 8 bits.
//
// Controls: seg_en sets the degree of segmentation of the accumulator adder
// (one bit per slice boundary, 0 = nominal, all ones = fully segmented);
// latch_en is the budgeting latch enable (from db_enable_gen, or 1).
module l1_norm
  import mf_pkg::*;
#(
  parameter int unsigned DW   = DATA_W,
  parameter int unsigned AW   = 16,
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

  logic [DW-1:0] a_q, b_q, d;

  // A1: |A - B|
  abs_diff #(.DW(DW)) u_absdiff (.a(a_q), .b(b_q), .d(d));

  mf_shell #(.DW(DW), .PW(DW), .AW(AW), .NSEG(NSEG), .CW(CW), .ARCH(ARCH)) u_shell (
    .clk, .rst_n, .seg_en, .latch_en,
    .in_valid, .in_ready, .in_a, .in_b, .in_last,
    .a_q, .b_q, .a1_res(d),
    .out_valid, .result, .corr_busy
  );

endmodule
