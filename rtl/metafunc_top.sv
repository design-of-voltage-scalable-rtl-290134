// metafunc_top: the three voltage-scalable meta-functions side by side.
//
// Holds an L1-norm (sum of absolute differences, used for motion estimation
// and k-means), a dot-product (support vector machine classification) and an
// L2-norm (k-means) unit. Each unit has its own element stream and result port
// and its own controls:
//   seg_en[u]   degree of segmentation of the accumulator adder, one bit per
//               slice boundary: a set bit cuts that carry and counts it for
//               compensation (set when the supply is over-scaled); 0 = full
//               adder, all ones = every slice independent
//   db_en[u]    1 = the delay-budgeting latch between the unit's first stage
//               (|A-B|, A*B, or (A-B)^2) and its accumulator closes at the
//               rising edge of delayed-clock tap tap_sel[u]; 0 = latch open
//   tap_sel[u]  which tap of the shared clock delay chain closes the latch
// Unit index u: 0 = L1-norm, 1 = dot product, 2 = L2-norm (mf_pkg::mf_unit_e).
// One clock delay chain (clk_delay_line, a behavioural model of an inverter
// chain) is shared; each unit has its own tap multiplexer (db_enable_gen).
//
// Both techniques are present in every unit here and can be switched on and off
// independently; the segmented accumulator and the budgeting latch were
// proposed and evaluated as separate techniques, and putting both in one unit is
// this design's choice. Stream timing and result latency: see mf_shell.
// Reset is synchronous, active low.
module metafunc_top
  import mf_pkg::*;
#(
  parameter int unsigned TAPS         = 8,
  parameter int unsigned TAP_DELAY_PS = 250,
  parameter adder_arch_e ARCH         = ARCH_RCA,
  parameter int unsigned SELW         = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        seg_en [3],
  input  logic [2:0]        db_en,
  input  logic [SELW-1:0]   tap_sel [3],
  // L1-norm
  input  logic              l1_in_valid,
  output logic              l1_in_ready,
  input  logic [DATA_W-1:0] l1_a,
  input  logic [DATA_W-1:0] l1_b,
  input  logic              l1_last,
  output logic              l1_out_valid,
  output logic [15:0]       l1_result,
  output logic              l1_corr_busy,
  // dot product
  input  logic              dp_in_valid,
  output logic              dp_in_ready,
  input  logic [DATA_W-1:0] dp_a,
  input  logic [DATA_W-1:0] dp_b,
  input  logic              dp_last,
  output logic              dp_out_valid,
  output logic [31:0]       dp_result,
  output logic              dp_corr_busy,
  // L2-norm
  input  logic              l2_in_valid,
  output logic              l2_in_ready,
  input  logic [DATA_W-1:0] l2_a,
  input  logic [DATA_W-1:0] l2_b,
  input  logic              l2_last,
  output logic              l2_out_valid,
  output logic [31:0]       l2_result,
  output logic              l2_corr_busy
);

  logic [TAPS-1:0] taps;
  logic [2:0]      latch_en;

  clk_delay_line #(.TAPS(TAPS), .TAP_DELAY_PS(TAP_DELAY_PS)) u_delay (
    .clk (clk),
    .taps(taps)
  );

  for (genvar u = 0; u < 3; u++) begin : g_db
    db_enable_gen #(.TAPS(TAPS), .SELW(SELW)) u_en (
      .clk     (clk),
      .taps    (taps),
      .tap_sel (tap_sel[u]),
      .db_en   (db_en[u]),
      .latch_en(latch_en[u])
    );
  end

  l1_norm #(.DW(DATA_W), .AW(16), .ARCH(ARCH)) u_l1 (
    .clk, .rst_n,
    .seg_en   (seg_en[MF_L1]),
    .latch_en (latch_en[MF_L1]),
    .in_valid (l1_in_valid),
    .in_ready (l1_in_ready),
    .in_a     (l1_a),
    .in_b     (l1_b),
    .in_last  (l1_last),
    .out_valid(l1_out_valid),
    .result   (l1_result),
    .corr_busy(l1_corr_busy)
  );

  dot_product #(.DW(DATA_W), .AW(32), .ARCH(ARCH)) u_dp (
    .clk, .rst_n,
    .seg_en   (seg_en[MF_DOT]),
    .latch_en (latch_en[MF_DOT]),
    .in_valid (dp_in_valid),
    .in_ready (dp_in_ready),
    .in_a     (dp_a),
    .in_b     (dp_b),
    .in_last  (dp_last),
    .out_valid(dp_out_valid),
    .result   (dp_result),
    .corr_busy(dp_corr_busy)
  );

  l2_norm #(.DW(DATA_W), .AW(32), .ARCH(ARCH)) u_l2 (
    .clk, .rst_n,
    .seg_en   (seg_en[MF_L2]),
    .latch_en (latch_en[MF_L2]),
    .in_valid (l2_in_valid),
    .in_ready (l2_in_ready),
    .in_a     (l2_a),
    .in_b     (l2_b),
    .in_last  (l2_last),
    .out_valid(l2_out_valid),
    .result   (l2_result),
    .corr_busy(l2_corr_busy)
  );

endmodule
