// abs_diff: absolute difference |a - b| of two unsigned DW-bit operands.
//
// The first chained arithmetic unit of the L1-norm (sum of absolute
// differences). It subtracts once with one extra bit and negates the result
// when the borrow shows that b > a. The structure is this design's own choice;
// only the function is given. Purely combinational.
module abs_diff #(
  parameter int unsigned DW = 8
) (
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  output logic [DW-1:0] d
);

  logic [DW:0] diff;

  assign diff = {1'b0, a} - {1'b0, b};
  // diff[DW] is the borrow: negative result, so take the two's complement.
  assign d = diff[DW] ? (~diff[DW-1:0] + 1'b1) : diff[DW-1:0];

endmodule
