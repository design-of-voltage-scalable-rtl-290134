// l2_norm: voltage-scalable L2-norm unit (sum of squared differences).
//
// result = sum over the vector of (a_i - b_i)^2, for unsigned DW-bit elements
// (the squared Euclidean distance; no square root is taken). Datapath: input
// registers A and B, the subtractor and the Wallace-tree multiplier that
// squares its output, the delay-budgeting latch, and the DSEC accumulator
// feeding the L2-NORM result register; see mf_shell for the stream and timing.
// The chain has three units; for delay budgeting the subtractor and the
// multiplier count as one first unit and the latch sits after the multiplier.
// The subtractor delivers |a - b|, whose square equals (a - b)^2, so one
// unsigned DW x DW multiplier is enough. Defaults: 8-bit elements, 32-bit
// accumulator in 4 slices of 8 bits (slice count chosen here), 1-bit counters.
//
// Controls: seg_en sets the degree of segmentation of the accumulator adder
// (one bit per slice boundary, 0 = nominal, all ones = fully segmented);
// latch_en is the budgeting latch enable (from db_enable_gen, or 1).
module l2_norm
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

  logic [DW-1:0]   a_q, b_q, d;
  logic [2*DW-1:0] sq;

  // A1 (joint unit): (A - B), then (A - B)^2
  abs_diff   #(.DW(DW)) u_sub (.a(a_q), .b(b_q), .d(d));
  multiplier #(.DW(DW)) u_mul (.a(d), .b(d), .p(sq));

  mf_shell #(.DW(DW), .PW(2*DW), .AW(AW), .NSEG(NSEG), .CW(CW), .ARCH(ARCH)) u_shell (
    .clk, .rst_n, .seg_en, .latch_en,
    .in_valid, .in_ready, .in_a, .in_b, .in_last,
    .a_q, .b_q, .a1_res(sq),
    .out_valid, .result, .corr_busy
  );

endmodule
