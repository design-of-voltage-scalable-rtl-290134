// mf_pkg: types and constants shared by the voltage-scalable meta-function units.
//
// The units compute L1-norm, dot product and L2-norm of two vectors of small
// unsigned integers. Each holds an accumulator whose adder can be split into
// slices under voltage over-scaling (VOS), with the dropped carries counted and
// added back later (dynamic segmentation with error compensation, DSEC), and a
// transparent latch between its two chained arithmetic stages whose closing time
// can be moved (delay budgeting). The operand width of 8 bits and the 16/32-bit
// accumulators follow the component sizes the design was evaluated with; the
// enum below names the two adder architectures it was evaluated with.
package mf_pkg;

  // Architecture of one slice of the segmented adder.
  typedef enum logic [0:0] {
    ARCH_RCA = 1'b0,   // ripple-carry chain of full adders
    ARCH_KS  = 1'b1    // Kogge-Stone parallel-prefix adder
  } adder_arch_e;

  // Operand width of every meta-function (8-bit pixels / features).
  localparam int unsigned DATA_W = 8;

  // Unit index used for the per-unit control vectors of the top level.
  typedef enum logic [1:0] {
    MF_L1  = 2'd0,
    MF_DOT = 2'd1,
    MF_L2  = 2'd2
  } mf_unit_e;

endpackage
