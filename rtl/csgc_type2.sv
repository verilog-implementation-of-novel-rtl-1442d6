// csgc_type2: control signal generating cell, type II.
//
// The leftmost cell of every control-block group except the first. Besides
// its own operand bits and the control signal of its left neighbour, it takes
// the control signal of the leftmost cell of the previous group (position
// i+GROUP, i+4 in the 4-cell grouping). That extra input lets a high control
// signal jump a whole group instead of rippling through all its cells.
//
// Interface: a, b (operand bits), ctl_left (CTL of position i+1), ctl_jump
// (CTL of the previous group's leftmost cell), ctl (CTL of position i).
// Timing: purely combinational.
module csgc_type2 (
  input  logic a,
  input  logic b,
  input  logic ctl_left,
  input  logic ctl_jump,
  output logic ctl
);

  always_comb ctl = (a & b) | ctl_left | ctl_jump;

endmodule
