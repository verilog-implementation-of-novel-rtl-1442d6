// modified_xor: one sum bit of the carry-free addition block.
//
// In normal mode (ctl = 0) the cell is a plain exclusive-OR of its two
// operand bits, i.e. a one-bit addition that neither takes in nor produces a
// carry. In forced mode (ctl = 1) its output is pulled to 1 whatever the
// operands are. The transistor cell this models adds a pull-up device that
// ties the output to the supply and two devices that cut the XOR off when ctl
// is high; at the logic level that is "sum = ctl ? 1 : a ^ b".
//
// Interface: a, b (operand bits), ctl (mode from the control block), sum.
// Timing: purely combinational.
//
// The two modes follow the published cell; modelling it by its logic function
// rather than by transistors is this implementation's choice.
module modified_xor (
  input  logic a,
  input  logic b,
  input  logic ctl,
  output logic sum
);

  always_comb begin
    if (ctl) sum = 1'b1;
    else     sum = a ^ b;
  end

endmodule
