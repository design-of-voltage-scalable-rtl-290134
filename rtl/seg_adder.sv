// seg_adder: dynamically segmented adder.
//
// An AW-bit adder cut into NSEG slices of AW/NSEG bits. Between two slices sits a
// 2:1 multiplexer with its own control bit seg[k] (boundary k lies between
// slice k and slice k+1): with seg[k] = 0 it passes the slice's carry out to the
// next slice, with seg[k] = 1 it forces a 0 carry instead. seg = 0 gives an
// ordinary AW-bit adder (nominal supply); seg = all ones cuts every carry chain
// to one slice (deepest voltage over-scaling); settings in between give
// intermediate degrees of segmentation. The carries that were dropped this way
// come out on `dropped` (bit k: carry out of slice k, i.e. into bit
// (k+1)*AW/NSEG) for the error-compensation counters. The carry out of the top
// slice is discarded: the accumulator wraps modulo 2^AW.
//
// The slice architecture is a parameter (ripple-carry or Kogge-Stone).
// Purely combinational.
module seg_adder
  import mf_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter int unsigned NSEG = 4,
  parameter adder_arch_e ARCH = ARCH_RCA
) (
  input  logic [AW-1:0]   a,
  input  logic [AW-1:0]   b,
  input  logic [NSEG-2:0] seg,
  output logic [AW-1:0]   s,
  output logic [NSEG-2:0] dropped
);

  localparam int unsigned SW = AW / NSEG;

  if (AW % NSEG != 0 || NSEG < 2) begin : g_bad_cfg
    $error("seg_adder: AW must be a multiple of NSEG and NSEG >= 2");
  end

  logic [NSEG-1:0] cin;   // carry into each slice, after the multiplexer
  logic [NSEG-1:0] cout;  // raw carry out of each slice (the top one is unused)

  assign cin[0] = 1'b0;

  for (genvar k = 0; k < NSEG; k++) begin : g_slice
    slice_adder #(.W(SW), .ARCH(ARCH)) u_slice (
      .a   (a[k*SW +: SW]),
      .b   (b[k*SW +: SW]),
      .cin (cin[k]),
      .s   (s[k*SW +: SW]),
      .cout(cout[k])
    );
  end

  for (genvar k = 0; k < NSEG - 1; k++) begin : g_mux
    // Segmentation multiplexer: real carry or a forced 0.
    assign cin[k+1] = seg[k] ? 1'b0 : cout[k];
  end

  for (genvar k = 0; k < NSEG - 1; k++) begin : g_drop
    assign dropped[k] = seg[k] & cout[k];
  end

endmodule
