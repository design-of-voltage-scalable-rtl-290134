// ec_counters: error-compensation carry counters of the DSEC accumulator.
//
// One small counter per slice boundary of the segmented adder counts the carries
// that the segmentation multiplexers dropped (counter k: carries into bit
// (k+1)*AW/NSEG). A counter has CW bits plus an overflow bit: it overflows when
// it reaches 2^CW, and still holds that value so the correction is exact. `ovf`
// tells the controller that a correction must be scheduled; `term` is the value
// to add back, sum over k of count_k << ((k+1)*AW/NSEG), taken modulo 2^AW.
// With AW=16, NSEG=4, CW=1 and two carries lost at bits 4 and 8 each, term is
// 0x220.
//
// The counters only change when a carry is actually dropped; this enable is the
// clock-gating condition of the correction logic. Timing: `inc` is sampled at
// the rising clock edge together with the sum it belongs to; `clr` (synchronous)
// zeroes every counter and wins over `inc`. Reset is synchronous, active low.
module ec_counters #(
  parameter int unsigned AW   = 16,
  parameter int unsigned NSEG = 4,
  parameter int unsigned CW   = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NSEG-2:0] inc,
  input  logic            clr,
  output logic            ovf,
  output logic            any,
  output logic [AW-1:0]   term
);

  localparam int unsigned SW = AW / NSEG;

  logic [CW:0] cnt [NSEG-1];

  for (genvar k = 0; k < NSEG - 1; k++) begin : g_cnt
    always_ff @(posedge clk) begin
      if (!rst_n || clr) begin
        cnt[k] <= '0;
      end else if (inc[k]) begin
        cnt[k] <= cnt[k] + 1'b1;
      end
    end

    // A counter that has overflowed must be corrected before it counts again.
    a_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
      (cnt[k][CW] && !clr) |-> !inc[k])
      else $error("ec_counters: carry counter %0d incremented past overflow", k);
  end

  always_comb begin
    logic [AW+CW:0] acc;
    ovf = 1'b0;
    any = 1'b0;
    acc = '0;
    for (int k = 0; k < NSEG - 1; k++) begin
      ovf |= cnt[k][CW];
      any |= (cnt[k] != '0);
      acc += (AW+CW+1)'(cnt[k]) << ((k + 1) * SW);
    end
    term = acc[AW-1:0];
  end

endmodule
