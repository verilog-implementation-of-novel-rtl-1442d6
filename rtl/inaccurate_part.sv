// inaccurate_part: carry-free approximate addition of the low-order bits.
//
// Scans the operands from the most significant to the least significant bit:
// while the two bits of a position are 00, 01 or 10 the sum bit is their
// one-bit sum (a ^ b); at the first position where both bits are 1 the scan
// stops and that sum bit and all bits to its right are set to 1. No carry is
// produced or consumed, so the result is exact whenever no position holds two
// ones and otherwise falls short of the true sum by the lost carry.
// The control block computes where the forcing begins; the carry-free
// addition block applies it.
//
// Interface: a, b (N-bit low-order operand slices), sum (N-bit approximate
// result), ctl (the mode vector, brought out for observation: ctl[0] = 1
// exactly when the result differs from the true sum). Timing: purely
// combinational.
module inaccurate_part #(
  parameter int unsigned N     = eta_pkg::ETA_N_INACC,
  parameter int unsigned GROUP = eta_pkg::CSGC_GROUP
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic [N-1:0] ctl
);

  control_block #(.N(N), .GROUP(GROUP)) u_ctrl (
    .a  (a),
    .b  (b),
    .ctl(ctl)
  );

  carry_free_adder #(.N(N)) u_cfa (
    .a  (a),
    .b  (b),
    .ctl(ctl),
    .sum(sum)
  );

endmodule
