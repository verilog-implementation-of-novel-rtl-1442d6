// rca: ripple-carry adder used as the accurate (high-order) part of the ETA.
//
// N full adders in a chain from the least to the most significant bit. The
// chain's carry-in is tied to 0: the accurate part never receives a carry
// from the inaccurate part below it, which is what lets the two parts work at
// the same time. A ripple-carry adder is chosen because, in this split, the
// inaccurate part sets the overall delay, so the accurate part only needs to
// be small and low-power. The carry-out becomes the top bit of the ETA sum.
//
// Interface: a, b (N-bit high-order operand slices), sum (N bits), cout.
// Timing: purely combinational; worst-case path is N carry stages.
//
// The ripple-carry structure and grounded carry-in follow the published
// design; the gate-level full adder cell is this implementation's own.
module rca #(
  parameter int unsigned N = eta_pkg::ETA_WIDTH - eta_pkg::ETA_N_INACC
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] carry;

  assign carry[0] = 1'b0;   // carry-in connected to ground

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[N];

endmodule
