// tb_workload_svm: kernel evaluations of a support-vector classifier on the
// dot-product unit.
//
// Inputs are 784-element vectors (28x28 images of 8-bit pixels), generated
// here as noisy copies of one of NSV stored support vectors (also generated).
// For every input the unit computes its dot product with every support vector,
// the core of a linear or polynomial kernel, alternating between the full and
// the fully segmented accumulator. Each dot product is compared with the one
// computed here, and the support vector with the highest normalised score
// (dot product divided by the support vector's own norm squared, done here)
// must be the one the input was made from.
module tb_workload_svm;
  import mf_pkg::*;

  localparam int N   = 784;
  localparam int NSV = 6;
  localparam int NIN = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0]  seg_en;
  logic        in_valid, in_ready, in_last, out_valid, busy;
  logic [7:0]  in_a, in_b;
  logic [31:0] result;

  dot_product dut (
    .clk(clk), .rst_n(rst_n), .seg_en(seg_en), .latch_en(1'b1),
    .in_valid(in_valid), .in_ready(in_ready), .in_a(in_a), .in_b(in_b), .in_last(in_last),
    .out_valid(out_valid), .result(result), .corr_busy(busy));

  logic [7:0] sv [NSV][N];
  logic [7:0] x [N];
  longint     sv_norm [NSV];

  int checks = 0, failures = 0, n_corr = 0;
  always @(posedge clk) if (rst_n && busy) n_corr++;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 1'b0; in_a = '0; in_b = '0; in_last = 1'b0; seg_en = '0;
    // support vectors: sparse bright strokes on a dark background
    for (int s = 0; s < NSV; s++) begin
      sv_norm[s] = 0;
      for (int i = 0; i < N; i++) begin
        sv[s][i] = ($urandom_range(0, 3) == 0) ? 8'($urandom_range(128, 255)) : 8'($urandom_range(0, 20));
        sv_norm[s] += longint'(sv[s][i]) * longint'(sv[s][i]);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < NIN; t++) begin
      int cls, best;
      real best_score;
      cls = $urandom_range(0, NSV - 1);
      for (int i = 0; i < N; i++) begin
        int p;
        p = int'(sv[cls][i]) + $urandom_range(0, 30) - 15;
        x[i] = 8'((p < 0) ? 0 : (p > 255) ? 255 : p);
      end
      best = -1;
      best_score = -1.0;
      for (int s = 0; s < NSV; s++) begin
        longint e;
        real score;
        seg_en = (s % 2 == 0) ? 3'b111 : 3'b000;
        e = 0;
        for (int i = 0; i < N; i++) begin
          e += longint'(x[i]) * longint'(sv[s][i]);
          in_valid = 1'b1;
          in_a = x[i];
          in_b = sv[s][i];
          in_last = (i == N - 1);
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
        if (longint'(result) != e) begin
          failures++;
          $display("input %0d, support vector %0d: %0d expected %0d", t, s, result, e);
        end
        score = real'(result) / real'(sv_norm[s]);
        if (score > best_score) begin
          best_score = score;
          best = s;
        end
      end
      checks++;
      if (best != cls) begin
        failures++;
        $display("input %0d: best match %0d, made from %0d", t, best, cls);
      end
    end
    checks++;
    if (n_corr == 0) begin failures++; $display("no correction happened"); end
    $display("correction cycles: %0d", n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
