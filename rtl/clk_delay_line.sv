// clk_delay_line: behavioural model of the tapped clock delay chain used for
// delay budgeting.
//
// In silicon this is a chain of inverters driven by the clock; every second
// inverter output is a tap, a copy of the clock delayed by a multiple of the
// stage delay. The taps are the candidate instants at which the budgeting latch
// closes. A delay chain has no logic function, so it is modelled here with
// transport delays: taps[i] is clk delayed by (i+1)*TAP_DELAY_PS picoseconds.
// The number of taps and the delay per tap are this design's choices; they must
// be set so that the latest tap still falls within the high phase of the clock.
//
// Interface: clk in; taps[TAPS-1:0] out (taps[0] earliest).
module clk_delay_line #(
  parameter int unsigned TAPS         = 8,
  parameter int unsigned TAP_DELAY_PS = 250
) (
  input  logic            clk,
  output logic [TAPS-1:0] taps
);

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    // Two inverters per tap: a non-inverting, delayed copy of the clock.
    assign #((i + 1) * TAP_DELAY_PS * 1ps) taps[i] = clk;
  end

endmodule
