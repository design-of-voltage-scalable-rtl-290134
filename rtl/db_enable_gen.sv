// db_enable_gen: delay-budgeting latch enable generator.
//
// A multiplexer picks one of the delayed clock taps (the degree of voltage
// over-scaling decides which); the latch enable is the clock AND NOT the picked
// tap, i.e. the latch is transparent from the rising clock edge until the
// rising edge of the picked tap, and closed for the rest of the cycle. With
// db_en = 0 the enable is held high, the latch stays transparent and the chain
// is the baseline one. The gating form is this design's choice; it needs the
// tap delay to be shorter than the clock's high time.
//
// Interface: clk, taps[TAPS-1:0], tap_sel, db_en in; latch_en out.
// Combinational on clock-like signals; no state.
module db_enable_gen #(
  parameter int unsigned TAPS = 8,
  parameter int unsigned SELW = (TAPS > 1) ? $clog2(TAPS) : 1
) (
  input  logic            clk,
  input  logic [TAPS-1:0] taps,
  input  logic [SELW-1:0] tap_sel,
  input  logic            db_en,
  output logic            latch_en
);

  logic tap_clk;

  assign tap_clk  = taps[tap_sel];
  assign latch_en = db_en ? (clk & ~tap_clk) : 1'b1;

endmodule
