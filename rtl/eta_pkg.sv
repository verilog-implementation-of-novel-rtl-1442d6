// eta_pkg: sizes shared by the error-tolerant adder (ETA) modules.
//
// The defaults describe the 40-bit adder that is the main configuration of
// this design: 20 accurate high-order bits, 20 inaccurate low-order bits, and
// a control block whose 20 cells are arranged in 5 groups of 4.
package eta_pkg;

  // Total operand width of the adder.
  parameter int unsigned ETA_WIDTH   = 40;
  // Number of low-order bits handled by the carry-free (inaccurate) part.
  parameter int unsigned ETA_N_INACC = 20;
  // Cells per group in the control block; groups are linked by jump wires.
  parameter int unsigned CSGC_GROUP  = 4;

endpackage
