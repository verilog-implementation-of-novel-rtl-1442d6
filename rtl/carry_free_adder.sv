// carry_free_adder: the carry-free addition block of the inaccurate part.
//
// N modified XOR gates side by side, one per sum bit, with no carry between
// them. Bit i is a ^ b when ctl[i] = 0 and is forced to 1 when ctl[i] = 1.
//
// Interface: a, b (N-bit low-order operand slices), ctl (N-bit mode vector
// from the control block), sum (N-bit low-order result). Timing: purely
// combinational, one gate deep.
module carry_free_adder #(
  parameter int unsigned N = eta_pkg::ETA_N_INACC
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] ctl,
  output logic [N-1:0] sum
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    modified_xor u_mxor (
      .a  (a[i]),
      .b  (b[i]),
      .ctl(ctl[i]),
      .sum(sum[i])
    );
  end

endmodule
