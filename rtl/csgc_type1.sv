// csgc_type1: control signal generating cell, type I.
//
// A cell of the control block's chain. It raises its control output when its
// own operand bits are both 1, or when the control signal of the cell to its
// left (one bit more significant) is already high; this is how a "both ones"
// detection spreads towards the least significant bit.
//
// Interface: a, b (operand bits of this position), ctl_left (CTL of position
// i+1), ctl (CTL of position i). Timing: purely combinational.
module csgc_type1 (
  input  logic a,
  input  logic b,
  input  logic ctl_left,
  output logic ctl
);

  always_comb ctl = (a & b) | ctl_left;

endmodule
