// tb_dot_product: end-to-end check of the dot-product unit.
// Random vectors (1 to 40 elements of 8 bits) are streamed with random gaps and
// random segmentation masks; the budgeting latch is driven the way the delay
// chain would drive it (open from the clock edge for 2 ns) or held open. Every
// result is compared, in order, with the sum of a * b worked out here. Timing:
// in nominal mode a vector of N elements sent without gaps into an idle unit
// must give its result N + 2 cycles after its first element was taken.
module tb_dot_product;
  import mf_pkg::*;

  localparam int AW = 32;

  int checks = 0, failures = 0;
  int n_corr_cycles = 0, n_db = 0, n_stall = 0;

  logic clk = 1'b0, rst_n = 1'b0, clk_d;
  always #5 clk = ~clk;
  assign #2 clk_d = clk;

  logic [2:0]    seg_en;
  logic          db, latch_en;
  logic          in_valid, in_ready, in_last, out_valid, busy;
  logic [7:0]    in_a, in_b;
  logic [AW-1:0] result;

  assign latch_en = db ? (clk & ~clk_d) : 1'b1;

  dot_product dut (
    .clk(clk), .rst_n(rst_n), .seg_en(seg_en), .latch_en(latch_en),
    .in_valid(in_valid), .in_ready(in_ready), .in_a(in_a), .in_b(in_b), .in_last(in_last),
    .out_valid(out_valid), .result(result), .corr_busy(busy));

  function automatic logic [AW-1:0] elem(input logic [7:0] a, input logic [7:0] b);
    return AW'(a) * AW'(b);
  endfunction

  logic [AW-1:0] expq [$];
  int cyc = 0;
  int exp_out_cyc = -1;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (busy) n_corr_cycles++;
    if (db && in_valid) n_db++;
    if (in_valid && !in_ready) n_stall++;
    if (rst_n && out_valid) begin
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("unexpected result %h", result);
      end else begin
        logic [AW-1:0] e;
        e = expq.pop_front();
        if (result !== e) begin
          failures++;
          $display("cycle %0d: result %h exp %h", cyc, result, e);
        end
      end
      if (exp_out_cyc >= 0) begin
        checks++;
        if (cyc != exp_out_cyc) begin
          failures++;
          $display("latency: result in cycle %0d, expected %0d", cyc, exp_out_cyc);
        end
        exp_out_cyc = -1;
      end
    end
  end

  task automatic send_vector(input int n, input bit gaps, input bit timed);
    logic [AW-1:0] acc = '0;
    int t0 = -1;
    for (int i = 0; i < n; i++) begin
      logic [7:0] a, b;
      a = 8'($urandom);
      b = 8'($urandom);
      acc += elem(a, b);
      while (gaps && $urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_a = a;
      in_b = b;
      in_last = (i == n - 1);
      if (i == n - 1) expq.push_back(acc);
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      if (i == 0) t0 = cyc;
      if (timed && i == n - 1) exp_out_cyc = t0 + n + 2;
      @(negedge clk);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    seg_en = 3'b000; db = 1'b0;
    in_valid = 1'b0; in_a = '0; in_b = '0; in_last = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // timed vectors in nominal mode
    for (int v = 0; v < 10; v++) begin
      db = 1'(v);
      send_vector($urandom_range(1, 40), 1'b0, 1'b1);
      repeat (6) @(negedge clk);
    end
    // random traffic
    for (int v = 0; v < 300; v++) begin
      seg_en = ($urandom_range(0, 1) == 0) ? 3'b000 : 3'($urandom);
      db = 1'($urandom);
      send_vector($urandom_range(1, 40), 1'b1, 1'b0);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d results missing", expq.size()); end
    checks++;
    if (n_corr_cycles == 0 || n_db == 0 || n_stall == 0) begin
      failures++;
      $display("mechanism not exercised: corr=%0d db=%0d stall=%0d", n_corr_cycles, n_db, n_stall);
    end
    $display("correction cycles=%0d stalls=%0d", n_corr_cycles, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
