// dsec_accumulator: voltage-scalable accumulator with dynamic segmentation and
// multi-cycle error compensation (DSEC).
//
// The sum register is fed by a segmented adder (seg_adder). With seg_en = 0 the
// adder is a normal AW-bit adder. Each set bit k of seg_en (voltage
// over-scaled) cuts the carry chain at the boundary above slice k; with all
// bits set no carry chain is longer than one slice. Each carry
// that this drops is counted in a small counter per slice boundary
// (ec_counters). The sum register then holds a "segmented sum" that is short by
// the correction term sum(count_k << ((k+1)*AW/NSEG)).
//
// Correction is dynamic: as soon as any counter overflows (reaches 2^CW) the
// controller stops taking addends. The cycle in which the overflow is seen takes
// no addend; then CORR_CYCLES (2) cycles add the correction term to the sum with
// the same adder, all slice carries propagated. The correction addition is given
// two cycles so that it is itself error free under over-scaling; in this RTL the
// sum register simply loads on the last of those cycles. Counters clear at that
// moment and accumulation resumes on the next cycle. A correction is also run
// when `flush` is high and any counter is non-zero, so that a final sum can be
// made exact.
//
// Example (AW=16, NSEG=4, CW=1): the segmented sum 0x008C with counters (C1,C0) =
// (2,2) becomes 0x008C + 0x220 = 0x02AC after the overflow cycle and two
// correction cycles.
//
// Interface:
//   seg_en     per slice boundary: 1 = carry cut and counted (degree of segmentation)
//   clear      synchronous: sum, counters and controller to zero (wins over all)
//   add_valid  an addend is offered; add_ready = it is taken this cycle
//   flush      request a correction of whatever carries are pending
//   exact      high when no carries are pending and no correction is running:
//              `sum` is then the true sum
//   corr_busy  a correction (including its detection cycle) is in progress
// Reset is synchronous, active low. One addend per cycle when no correction runs.
// The per-cycle timing of the correction (one detection cycle, two correction
// cycles) follows the worked example of the scheme; counters are updated in the
// same cycle as the sum they belong to.
module dsec_accumulator
  import mf_pkg::*;
#(
  parameter int unsigned AW          = 16,
  parameter int unsigned NSEG        = 4,
  parameter int unsigned CW          = 1,
  parameter adder_arch_e ARCH        = ARCH_RCA,
  parameter int unsigned CORR_CYCLES = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic [NSEG-2:0] seg_en,
  input  logic          add_valid,
  output logic          add_ready,
  input  logic [AW-1:0] addend,
  input  logic          flush,
  output logic [AW-1:0] sum,
  output logic          exact,
  output logic          corr_busy
);

  typedef enum logic [0:0] {
    S_RUN  = 1'b0,   // accumulate addends (or detect the need for a correction)
    S_CORR = 1'b1    // multi-cycle addition of the correction term
  } state_e;

  localparam int unsigned CCW = (CORR_CYCLES > 1) ? $clog2(CORR_CYCLES) : 1;

  state_e          state_q;
  logic [CCW-1:0]  ccnt_q;
  logic [AW-1:0]   sum_q;

  logic            ovf, any;
  logic [AW-1:0]   term;
  logic [AW-1:0]   adder_b, adder_s;
  logic [NSEG-2:0] dropped;
  logic            need_corr, take, corr_done;

  // Controller decisions.
  assign need_corr = ovf || (flush && any);
  assign add_ready = (state_q == S_RUN) && !need_corr && !clear;
  assign take      = add_valid && add_ready;
  assign corr_done = (state_q == S_CORR) && (ccnt_q == CCW'(CORR_CYCLES - 1));

  // One adder for both jobs: addends in segmented mode, the correction term with
  // every carry propagated.
  assign adder_b = (state_q == S_CORR) ? term : addend;

  seg_adder #(.AW(AW), .NSEG(NSEG), .ARCH(ARCH)) u_add (
    .a      (sum_q),
    .b      (adder_b),
    .seg    ((state_q == S_RUN) ? seg_en : '0),
    .s      (adder_s),
    .dropped(dropped)
  );

  ec_counters #(.AW(AW), .NSEG(NSEG), .CW(CW)) u_cnt (
    .clk  (clk),
    .rst_n(rst_n),
    .inc  (take ? dropped : '0),
    .clr  (clear || corr_done),
    .ovf  (ovf),
    .any  (any),
    .term (term)
  );

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      state_q <= S_RUN;
      ccnt_q  <= '0;
      sum_q   <= '0;
    end else begin
      unique case (state_q)
        S_RUN: begin
          if (take) begin
            sum_q <= adder_s;
          end else if (need_corr) begin
            state_q <= S_CORR;
            ccnt_q  <= '0;
          end
        end
        S_CORR: begin
          if (corr_done) begin
            sum_q   <= adder_s;
            state_q <= S_RUN;
          end else begin
            ccnt_q <= ccnt_q + 1'b1;
          end
        end
        default: state_q <= S_RUN;
      endcase
    end
  end

  assign sum       = sum_q;
  assign exact     = (state_q == S_RUN) && !any;
  assign corr_busy = (state_q == S_CORR) || need_corr;

  // The correction term must not change while it is being added.
  a_term_stable: assert property (@(posedge clk) disable iff (!rst_n || clear)
    (state_q == S_CORR && !corr_done) |=> $stable(term))
    else $error("dsec_accumulator: correction term changed during correction");

endmodule
