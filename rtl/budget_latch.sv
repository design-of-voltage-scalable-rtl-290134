// budget_latch: transparent latch for delay budgeting between two chained units.
//
// Sits between the first arithmetic unit A1 and the second unit A2 of a chain
// that is evaluated in one clock cycle. While `en` is high the latch is
// transparent and A2 sees A1's output as it settles; when `en` falls, the
// output of A1 is frozen for the rest of the cycle, so late (over-scaled)
// transitions of A1 no longer reach A2 and A2 gets the remaining time of the
// cycle. Choosing when `en` falls moves time from A1 to A2. With `en` held high
// the latch is a wire and the chain behaves like the baseline.
//
// The latch is open while `en` is high (this polarity is a choice of this
// design). Interface: en, d in; q out. Level-sensitive, no reset.
module budget_latch #(
  parameter int unsigned W = 16
) (
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch begin
    if (en) begin
      q = d;
    end
  end

endmodule
