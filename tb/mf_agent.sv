// mf_agent: stream driver and result checker for one meta-function unit,
// used by the top-level testbench.
//
// Sends NVEC random vectors of 8-bit elements (length from MINLEN to MAXLEN)
// with random gaps, while choosing per vector the accumulator mode (seg_en)
// (none, all or some slice boundaries cut) and the delay-budgeting setting (db_en, tap_sel; every tap is used in turn).
// Each result is compared, in order, with the value worked out here:
// KIND 0 = sum |a-b|, 1 = sum a*b, 2 = sum (a-b)^2, modulo 2^AW.
// Counts the mechanisms seen: producer stalls, correction cycles during a
// vector (counter overflow) and after its last element (end-of-vector flush),
// vectors in each accumulator mode and with budgeting on.
module mf_agent #(
  parameter int AW     = 16,
  parameter int KIND   = 0,
  parameter int NVEC   = 20,
  parameter int MINLEN = 1,
  parameter int MAXLEN = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic          in_valid,
  input  logic          in_ready,
  output logic [7:0]    a,
  output logic [7:0]    b,
  output logic          last,
  input  logic          out_valid,
  input  logic [AW-1:0] result,
  input  logic          corr_busy,
  output logic [2:0]    seg_en,
  output logic          db_en,
  output logic [2:0]    tap_sel,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_stall,
  output int            n_ovf_corr,
  output int            n_flush_corr,
  output int            n_seg_vec,
  output int            n_nom_vec,
  output int            n_db_vec
);

  logic [AW-1:0] expq [$];
  bit            tail;     // last element sent, result not yet seen

  function automatic logic [AW-1:0] elem(input logic [7:0] x, input logic [7:0] y);
    int d;
    d = int'(x) - int'(y);
    case (KIND)
      0:       return AW'((d < 0) ? -d : d);
      1:       return AW'(int'(x) * int'(y));
      default: return AW'(d * d);
    endcase
  endfunction

  initial begin
    checks = 0; failures = 0; n_stall = 0; n_ovf_corr = 0; n_flush_corr = 0;
    n_seg_vec = 0; n_nom_vec = 0; n_db_vec = 0; tail = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (corr_busy) begin
        if (tail) n_flush_corr++;
        else      n_ovf_corr++;
      end
      if (out_valid) begin
        checks++;
        tail = 0;
        if (expq.size() == 0) begin
          failures++;
          $display("%m: unexpected result %h", result);
        end else begin
          logic [AW-1:0] e;
          e = expq.pop_front();
          if (result !== e) begin
            failures++;
            $display("%m: result %h expected %h", result, e);
          end
        end
      end
    end
  end

  initial begin
    done = 1'b0;
    in_valid = 1'b0; a = '0; b = '0; last = 1'b0;
    seg_en = '0; db_en = 1'b0; tap_sel = '0;
    @(posedge rst_n);
    @(negedge clk);
    for (int v = 0; v < NVEC; v++) begin
      int n;
      logic [AW-1:0] acc;
      // wait until the previous vector has left before changing modes
      while (tail || expq.size() != 0) @(negedge clk);
      // nominal, fully segmented, or a random partial segmentation
      seg_en  = (v % 3 == 0) ? 3'b000 : (v % 3 == 1) ? 3'b111 : 3'($urandom_range(1, 6));
      db_en   = (v % 2 == 0);
      tap_sel = 3'(v / 2);
      if (seg_en != 0) n_seg_vec++; else n_nom_vec++;
      if (db_en) n_db_vec++;
      n = $urandom_range(MINLEN, MAXLEN);
      acc = '0;
      for (int i = 0; i < n; i++) begin
        logic [7:0] x, y;
        x = 8'($urandom);
        y = 8'($urandom);
        acc += elem(x, y);
        while ($urandom_range(0, 7) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        a = x;
        b = y;
        last = (i == n - 1);
        #1;
        while (!in_ready) begin
          @(negedge clk);
          #1;
        end
        if (i == n - 1) begin
          expq.push_back(acc);
          tail = 1;
        end
        @(negedge clk);
      end
      in_valid = 1'b0;
    end
    while (tail || expq.size() != 0) @(negedge clk);
    done = 1'b1;
  end
endmodule
