// tb_workload_me: motion estimation on the L1-norm unit.
//
// A 48x48 reference frame of 8-bit pixels is generated (a hashed texture, so
// every position looks different). Each current block is the 16x16 patch of
// the reference at a known displacement, plus small noise. A full search over
// displacements -8..+8 in both directions computes the sum of absolute
// differences of the block against all 289 candidate positions on the unit, in
// fully segmented mode, and keeps the best. Every SAD is compared with the one
// computed here, and the best displacement must be the one used to make the
// block.
//
// The same search runs at the same time on four L1-norm units whose carry
// counters are 1, 2, 3 and 4 bits wide. The cycles lost to corrections are
// reported for each, as a share of the element cycles; wider counters must
// not lose more cycles than narrower ones.
module tb_workload_me;
  import mf_pkg::*;

  localparam int FW = 48;       // frame width and height
  localparam int BS = 16;       // block size
  localparam int R  = 8;        // search range
  localparam int NBLK = 2;      // blocks searched
  localparam int NCW  = 4;      // counter widths 1..NCW

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] ref_frame [FW][FW];
  logic [7:0] cur_blk [NBLK][BS][BS];
  int         true_dx [NBLK], true_dy [NBLK];

  int checks = 0, failures = 0;
  int done_cnt = 0;
  longint elem_cycles [NCW];
  longint corr_cycles [NCW];

  function automatic logic [7:0] texture(input int x, input int y);
    int unsigned h;
    h = 32'(x) * 32'd73856093 ^ 32'(y) * 32'd19349663;
    h = h ^ (h >> 13);
    h = h * 32'd2654435761;
    return 8'(h >> 24);
  endfunction

  function automatic int ref_sad(input int blk, input int px, input int py);
    int s = 0;
    for (int y = 0; y < BS; y++)
      for (int x = 0; x < BS; x++) begin
        int d;
        d = int'(cur_blk[blk][y][x]) - int'(ref_frame[py+y][px+x]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  initial begin
    for (int y = 0; y < FW; y++)
      for (int x = 0; x < FW; x++)
        ref_frame[y][x] = texture(x, y);
    for (int b = 0; b < NBLK; b++) begin
      true_dx[b] = $urandom_range(0, 2 * R) - R;
      true_dy[b] = $urandom_range(0, 2 * R) - R;
      for (int y = 0; y < BS; y++)
        for (int x = 0; x < BS; x++) begin
          int p;
          p = int'(ref_frame[16 + true_dy[b] + y][16 + true_dx[b] + x]) + $urandom_range(0, 4) - 2;
          cur_blk[b][y][x] = 8'((p < 0) ? 0 : (p > 255) ? 255 : p);
        end
    end
  end

  for (genvar g = 0; g < NCW; g++) begin : g_cw
    logic        in_valid, in_ready, in_last, out_valid, busy;
    logic [7:0]  in_a, in_b;
    logic [15:0] result;

    l1_norm #(.CW(g + 1)) dut (
      .clk(clk), .rst_n(rst_n), .seg_en(3'b111), .latch_en(1'b1),
      .in_valid(in_valid), .in_ready(in_ready), .in_a(in_a), .in_b(in_b), .in_last(in_last),
      .out_valid(out_valid), .result(result), .corr_busy(busy));

    always @(posedge clk) if (rst_n && busy) corr_cycles[g]++;

    initial begin
      in_valid = 1'b0; in_a = '0; in_b = '0; in_last = 1'b0;
      elem_cycles[g] = 0;
      corr_cycles[g] = 0;
      @(posedge rst_n);
      @(negedge clk);
      for (int b = 0; b < NBLK; b++) begin
        int best = 1 << 30, bdx = 0, bdy = 0;
        for (int dy = -R; dy <= R; dy++) begin
          for (int dx = -R; dx <= R; dx++) begin
            int e;
            for (int i = 0; i < BS * BS; i++) begin
              in_valid = 1'b1;
              in_a = cur_blk[b][i / BS][i % BS];
              in_b = ref_frame[16 + dy + i / BS][16 + dx + i % BS];
              in_last = (i == BS * BS - 1);
              #1;
              while (!in_ready) begin
                @(negedge clk);
                #1;
              end
              elem_cycles[g]++;
              @(negedge clk);
            end
            in_valid = 1'b0;
            while (!out_valid) @(negedge clk);
            e = ref_sad(b, 16 + dx, 16 + dy);
            checks++;
            if (int'(result) != e) begin
              failures++;
              $display("CW=%0d block %0d (%0d,%0d): SAD %0d expected %0d", g + 1, b, dx, dy, result, e);
            end
            if (int'(result) < best) begin
              best = int'(result);
              bdx = dx;
              bdy = dy;
            end
          end
        end
        checks++;
        if (bdx != true_dx[b] || bdy != true_dy[b]) begin
          failures++;
          $display("CW=%0d block %0d: motion vector (%0d,%0d), expected (%0d,%0d)", g + 1, b, bdx, bdy, true_dx[b], true_dy[b]);
        end
      end
      done_cnt++;
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_cnt == NCW);
    for (int g = 0; g < NCW; g++)
      $display("counter width %0d bits: %0d element cycles, %0d correction cycles (%0.2f %% overhead)",
               g + 1, elem_cycles[g], corr_cycles[g], 100.0 * real'(corr_cycles[g]) / real'(elem_cycles[g]));
    checks++;
    if (corr_cycles[0] == 0) begin failures++; $display("no corrections with 1-bit counters"); end
    for (int g = 1; g < NCW; g++) begin
      checks++;
      if (corr_cycles[g] > corr_cycles[g-1]) begin
        failures++;
        $display("wider counters (%0d bits) lost more cycles than %0d bits", g + 1, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
