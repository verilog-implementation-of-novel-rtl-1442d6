// eta: error-tolerant adder (ETA), WIDTH bits, default 40.
//
// The operands are split into an accurate high-order part of WIDTH-N_INACC
// bits and an inaccurate low-order part of N_INACC bits (20 + 20 by default).
// Both parts work at the same time, starting from the split point:
//   * the accurate part adds its bits normally, LSB to MSB, in a ripple-carry
//     adder whose carry-in is tied to 0;
//   * the inaccurate part adds without any carry, scanning MSB to LSB, and at
//     the first position where both bits are 1 sets that sum bit and all lower
//     ones to 1 (see inaccurate_part).
// Cutting the carry between the parts removes the long carry chain, so the
// delay is max(delay of accurate part, delay of inaccurate part). The result
// is never larger than the true sum, and is exact whenever no inaccurate
// position holds two ones.
//
// Interface: a, b (WIDTH-bit unsigned operands), sum (WIDTH+1 bits: the
// accurate part's carry-out on top), ctl (the inaccurate part's mode vector,
// ctl[0] = 1 marks an approximate result). Timing: purely combinational, no
// clock and no reset.
//
// The 20/20 split, the ripple-carry accurate part with grounded carry-in and
// the carry-free rule follow the published ETA design. Building it without
// registers, treating operands as unsigned, keeping the carry-out as the top
// sum bit and bringing ctl out as a port are choices of this implementation.
module eta #(
  parameter int unsigned WIDTH   = eta_pkg::ETA_WIDTH,
  parameter int unsigned N_INACC = eta_pkg::ETA_N_INACC,
  parameter int unsigned GROUP   = eta_pkg::CSGC_GROUP
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [WIDTH:0]     sum,
  output logic [N_INACC-1:0] ctl
);

  localparam int unsigned N_ACC = WIDTH - N_INACC;

  if (N_INACC < 1 || N_INACC >= WIDTH || GROUP < 1) begin : g_bad_split
    $error("eta: need 1 <= N_INACC < WIDTH and GROUP >= 1");
  end

  logic [N_ACC-1:0]   acc_sum;
  logic               acc_cout;
  logic [N_INACC-1:0] inacc_sum;

  rca #(.N(N_ACC)) u_accurate (
    .a   (a[WIDTH-1:N_INACC]),
    .b   (b[WIDTH-1:N_INACC]),
    .sum (acc_sum),
    .cout(acc_cout)
  );

  inaccurate_part #(.N(N_INACC), .GROUP(GROUP)) u_inaccurate (
    .a  (a[N_INACC-1:0]),
    .b  (b[N_INACC-1:0]),
    .sum(inacc_sum),
    .ctl(ctl)
  );

  assign sum = {acc_cout, acc_sum, inacc_sum};

endmodule
