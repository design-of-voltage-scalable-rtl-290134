// tb_metafunc_top: end-to-end test of the three meta-function units at their
// default sizes, running at the same time.
//
// Vector lengths follow typical uses of each kernel: 256 elements for the
// L1-norm (sum of absolute differences over a 16x16 block), up to 784 for the
// dot product (a 28x28 image against a support vector) and 14 for the L2-norm
// (a record of 14 attributes against a cluster centre). Modes change between
// vectors: full, fully segmented or partly segmented accumulator, delay budgeting on (every tap in
// turn) or off. Every result is checked, and each mechanism must occur at
// least once per unit: producer stall, correction caused by a counter
// overflow, correction at the end of a vector, both accumulator modes and
// budgeting. The clock is 10 ns, the taps are 0.25 ns apart.
module tb_metafunc_top;
  import mf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0] seg_en [3];
  logic [2:0] db_en;
  logic [2:0] tap_sel [3];

  logic        l1_v, l1_r, l1_l, l1_ov, l1_cb;
  logic [7:0]  l1_a, l1_b;
  logic [15:0] l1_res;
  logic        dp_v, dp_r, dp_l, dp_ov, dp_cb;
  logic [7:0]  dp_a, dp_b;
  logic [31:0] dp_res;
  logic        l2_v, l2_r, l2_l, l2_ov, l2_cb;
  logic [7:0]  l2_a, l2_b;
  logic [31:0] l2_res;

  metafunc_top dut (
    .clk(clk), .rst_n(rst_n), .seg_en(seg_en), .db_en(db_en), .tap_sel(tap_sel),
    .l1_in_valid(l1_v), .l1_in_ready(l1_r), .l1_a(l1_a), .l1_b(l1_b), .l1_last(l1_l),
    .l1_out_valid(l1_ov), .l1_result(l1_res), .l1_corr_busy(l1_cb),
    .dp_in_valid(dp_v), .dp_in_ready(dp_r), .dp_a(dp_a), .dp_b(dp_b), .dp_last(dp_l),
    .dp_out_valid(dp_ov), .dp_result(dp_res), .dp_corr_busy(dp_cb),
    .l2_in_valid(l2_v), .l2_in_ready(l2_r), .l2_a(l2_a), .l2_b(l2_b), .l2_last(l2_l),
    .l2_out_valid(l2_ov), .l2_result(l2_res), .l2_corr_busy(l2_cb));

  logic [2:0] done;
  int ck [3], fl [3], st [3], oc [3], fc [3], sv [3], nv [3], dv [3];

  mf_agent #(.AW(16), .KIND(0), .NVEC(24), .MINLEN(256), .MAXLEN(256)) ag_l1 (
    .clk(clk), .rst_n(rst_n), .in_valid(l1_v), .in_ready(l1_r), .a(l1_a), .b(l1_b), .last(l1_l),
    .out_valid(l1_ov), .result(l1_res), .corr_busy(l1_cb),
    .seg_en(seg_en[0]), .db_en(db_en[0]), .tap_sel(tap_sel[0]), .done(done[0]),
    .checks(ck[0]), .failures(fl[0]), .n_stall(st[0]), .n_ovf_corr(oc[0]), .n_flush_corr(fc[0]),
    .n_seg_vec(sv[0]), .n_nom_vec(nv[0]), .n_db_vec(dv[0]));

  mf_agent #(.AW(32), .KIND(1), .NVEC(24), .MINLEN(1), .MAXLEN(784)) ag_dp (
    .clk(clk), .rst_n(rst_n), .in_valid(dp_v), .in_ready(dp_r), .a(dp_a), .b(dp_b), .last(dp_l),
    .out_valid(dp_ov), .result(dp_res), .corr_busy(dp_cb),
    .seg_en(seg_en[1]), .db_en(db_en[1]), .tap_sel(tap_sel[1]), .done(done[1]),
    .checks(ck[1]), .failures(fl[1]), .n_stall(st[1]), .n_ovf_corr(oc[1]), .n_flush_corr(fc[1]),
    .n_seg_vec(sv[1]), .n_nom_vec(nv[1]), .n_db_vec(dv[1]));

  mf_agent #(.AW(32), .KIND(2), .NVEC(300), .MINLEN(14), .MAXLEN(14)) ag_l2 (
    .clk(clk), .rst_n(rst_n), .in_valid(l2_v), .in_ready(l2_r), .a(l2_a), .b(l2_b), .last(l2_l),
    .out_valid(l2_ov), .result(l2_res), .corr_busy(l2_cb),
    .seg_en(seg_en[2]), .db_en(db_en[2]), .tap_sel(tap_sel[2]), .done(done[2]),
    .checks(ck[2]), .failures(fl[2]), .n_stall(st[2]), .n_ovf_corr(oc[2]), .n_flush_corr(fc[2]),
    .n_seg_vec(sv[2]), .n_nom_vec(nv[2]), .n_db_vec(dv[2]));

  int checks = 0, failures = 0;

  task automatic report();
    string nm [3] = '{"L1-norm", "dot product", "L2-norm"};
    checks = 0;
    failures = 0;
    for (int u = 0; u < 3; u++) begin
      checks += ck[u];
      failures += fl[u];
      $display("%s: results=%0d stall_cycles=%0d overflow_corr_cycles=%0d flush_corr_cycles=%0d seg_vectors=%0d nominal_vectors=%0d db_vectors=%0d",
               nm[u], ck[u], st[u], oc[u], fc[u], sv[u], nv[u], dv[u]);
      // every mechanism must have happened at least once
      checks += 5;
      if (st[u] == 0) begin failures++; $display("%s: no stall", nm[u]); end
      if (oc[u] == 0) begin failures++; $display("%s: no overflow correction", nm[u]); end
      if (fc[u] == 0) begin failures++; $display("%s: no end-of-vector correction", nm[u]); end
      if (sv[u] == 0 || nv[u] == 0) begin failures++; $display("%s: one accumulator mode unused", nm[u]); end
      if (dv[u] == 0) begin failures++; $display("%s: budgeting never on", nm[u]); end
    end
  endtask

  initial begin
    #2000000;
    report();
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    repeat (5) @(negedge clk);
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
