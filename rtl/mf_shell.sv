// mf_shell: common frame of a voltage-scalable meta-function unit.
//
// A meta-function reduces two vectors element by element: an element-wise
// operation (the first chained unit, A1, supplied by the enclosing module)
// followed by accumulation (the second unit, A2). This shell holds everything
// except A1:
//   - the A and B input registers, with a valid bit and the `last` marker;
//   - the delay-budgeting latch between A1's result (a1_res) and the
//     accumulator, enabled by latch_en;
//   - the DSEC accumulator (dsec_accumulator);
//   - the result register and the end-of-vector sequencing.
// After the last element has been added, the shell asks the accumulator to
// correct any carries still pending (flush), waits until the sum is exact,
// copies it into the result register (out_valid pulses for one cycle with it)
// and clears the accumulator for the next vector. The flush at the end of a
// vector and the valid/ready element stream are this design's choices.
//
// Timing: an element is taken into the input registers when in_valid and
// in_ready are both high; it is added one cycle later unless a correction is
// running (three cycles: detection plus a two-cycle addition). Without
// corrections the unit takes one element per cycle, and out_valid rises two
// cycles after the cycle in which the last element was added (three more if
// carries are still pending then). Reset is synchronous, active low. While
// in_valid is high and in_ready low, the producer must hold its element.
module mf_shell
  import mf_pkg::*;
#(
  parameter int unsigned DW   = 8,
  parameter int unsigned PW   = 16,   // width of A1's result
  parameter int unsigned AW   = 32,
  parameter int unsigned NSEG = 4,
  parameter int unsigned CW   = 1,
  parameter adder_arch_e ARCH = ARCH_RCA
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NSEG-2:0] seg_en,
  input  logic          latch_en,
  // element stream
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_a,
  input  logic [DW-1:0] in_b,
  input  logic          in_last,
  // registered operands to A1 and its result
  output logic [DW-1:0] a_q,
  output logic [DW-1:0] b_q,
  input  logic [PW-1:0] a1_res,
  // result
  output logic          out_valid,
  output logic [AW-1:0] result,
  // status
  output logic          corr_busy
);

  logic          v_q, last_q, drain_q;
  logic [PW-1:0] a2_in;
  logic          add_valid, add_ready, take, acc_exact, acc_clear;
  logic [AW-1:0] acc_sum;

  // Input registers A and B.
  assign take      = add_valid && add_ready;
  assign in_ready  = !v_q || take;
  assign add_valid = v_q && !drain_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q    <= 1'b0;
      last_q <= 1'b0;
      a_q    <= '0;
      b_q    <= '0;
    end else if (in_ready) begin
      v_q <= in_valid;
      if (in_valid) begin
        a_q    <= in_a;
        b_q    <= in_b;
        last_q <= in_last;
      end
    end
  end

  // Delay-budgeting latch between A1 and the accumulator adder.
  budget_latch #(.W(PW)) u_latch (
    .en(latch_en),
    .d (a1_res),
    .q (a2_in)
  );

  dsec_accumulator #(.AW(AW), .NSEG(NSEG), .CW(CW), .ARCH(ARCH)) u_acc (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (acc_clear),
    .seg_en   (seg_en),
    .add_valid(add_valid),
    .add_ready(add_ready),
    .addend   (AW'(a2_in)),
    .flush    (drain_q),
    .sum      (acc_sum),
    .exact    (acc_exact),
    .corr_busy(corr_busy)
  );

  // End of vector: wait for an exact sum, publish it, clear the accumulator.
  assign acc_clear = drain_q && acc_exact;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      drain_q   <= 1'b0;
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (take && last_q) begin
        drain_q <= 1'b1;
      end else if (acc_clear) begin
        drain_q   <= 1'b0;
        out_valid <= 1'b1;
        result    <= acc_sum;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> (in_valid && $stable(in_a) && $stable(in_b) && $stable(in_last)))
    else $error("mf_shell: element changed while it was stalled");

endmodule
