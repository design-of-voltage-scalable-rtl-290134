// tb_workload_kmeans: k-means clustering on the L2-norm unit.
//
// NPT records of 14 attributes (8-bit, as for a census-style data set with
// quantised attributes) are generated around K hidden centres. Each k-means
// iteration computes, on the unit in fully segmented mode, the squared
// Euclidean distance of every record to every current centroid; the record
// joins the nearest one. Centroid updates (means) are done here. Every
// distance is compared with the one computed here, and the final clusters
// must match the hidden grouping (up to renumbering). The mean distance to
// the centroid is reported per iteration.
module tb_workload_kmeans;
  import mf_pkg::*;

  localparam int D    = 14;
  localparam int K    = 4;
  localparam int NPT  = 120;
  localparam int ITER = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready, in_last, out_valid, busy;
  logic [7:0]  in_a, in_b;
  logic [31:0] result;

  l2_norm dut (
    .clk(clk), .rst_n(rst_n), .seg_en(3'b111), .latch_en(1'b1),
    .in_valid(in_valid), .in_ready(in_ready), .in_a(in_a), .in_b(in_b), .in_last(in_last),
    .out_valid(out_valid), .result(result), .corr_busy(busy));

  logic [7:0] centre [K][D];
  logic [7:0] pt [NPT][D];
  int         hidden [NPT];
  logic [7:0] cent [K][D];
  int         assign_k [NPT];

  int checks = 0, failures = 0, n_corr = 0;
  always @(posedge clk) if (rst_n && busy) n_corr++;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic distance(input int p, input int k, output int dist_out);
    int e = 0;
    for (int i = 0; i < D; i++) begin
      int d;
      d = int'(pt[p][i]) - int'(cent[k][i]);
      e += d * d;
      in_valid = 1'b1;
      in_a = pt[p][i];
      in_b = cent[k][i];
      in_last = (i == D - 1);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    while (!out_valid) @(negedge clk);
    checks++;
    if (int'(result) != e) begin
      failures++;
      $display("record %0d centroid %0d: %0d expected %0d", p, k, result, e);
    end
    dist_out = int'(result);
  endtask

  initial begin
    in_valid = 1'b0; in_a = '0; in_b = '0; in_last = 1'b0;
    // well separated hidden centres
    for (int k = 0; k < K; k++)
      for (int i = 0; i < D; i++)
        centre[k][i] = 8'(((k >> (i % 2)) & 1) ? $urandom_range(170, 230) : $urandom_range(25, 85));
    for (int k = 0; k < K; k++) begin
      // make the centres differ in the first two attributes for sure
      centre[k][0] = (k & 1) ? 8'd220 : 8'd30;
      centre[k][1] = (k & 2) ? 8'd220 : 8'd30;
    end
    for (int p = 0; p < NPT; p++) begin
      hidden[p] = p % K;
      for (int i = 0; i < D; i++) begin
        int v;
        v = int'(centre[hidden[p]][i]) + $urandom_range(0, 40) - 20;
        pt[p][i] = 8'((v < 0) ? 0 : (v > 255) ? 255 : v);
      end
    end
    // initial centroids: one record of each hidden group
    for (int k = 0; k < K; k++)
      for (int i = 0; i < D; i++)
        cent[k][i] = pt[k][i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int it = 0; it < ITER; it++) begin
      real total;
      int  sum [K][D];
      int  cnt [K];
      total = 0.0;
      for (int k = 0; k < K; k++) begin
        cnt[k] = 0;
        for (int i = 0; i < D; i++) sum[k][i] = 0;
      end
      for (int p = 0; p < NPT; p++) begin
        int bestd, bestk, dd;
        bestd = 1 << 30;
        bestk = 0;
        for (int k = 0; k < K; k++) begin
          distance(p, k, dd);
          if (dd < bestd) begin
            bestd = dd;
            bestk = k;
          end
        end
        assign_k[p] = bestk;
        total += $sqrt(real'(bestd));
        cnt[bestk]++;
        for (int i = 0; i < D; i++) sum[bestk][i] += int'(pt[p][i]);
      end
      for (int k = 0; k < K; k++)
        if (cnt[k] != 0)
          for (int i = 0; i < D; i++) cent[k][i] = 8'(sum[k][i] / cnt[k]);
      $display("iteration %0d: mean distance to centroid %0.2f", it, total / NPT);
    end
    // clusters must reproduce the hidden grouping
    for (int p = 0; p < NPT; p++) begin
      checks++;
      if (assign_k[p] != assign_k[hidden[p]]) begin
        failures++;
        $display("record %0d clustered with %0d, expected with record %0d", p, assign_k[p], hidden[p]);
      end
    end
    checks++;
    if (n_corr == 0) begin failures++; $display("no correction happened"); end
    $display("correction cycles: %0d", n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
