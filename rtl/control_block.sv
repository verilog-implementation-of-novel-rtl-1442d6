// control_block: generates the mode signals of the carry-free addition block.
//
// CTL[i] goes high at the most significant position where both operand bits
// are 1 and at every position to its right, so that
//     ctl[i] = OR over j >= i of (a[j] & b[j]).
// It is built from N control signal generating cells (CSGCs). Rather than one
// chain of N cascaded cells, the cells are split, from the most significant
// end, into groups of GROUP cells (5 groups of 4 for the 20-bit default).
// Within a group each cell takes the CTL of its left neighbour (type I cell).
// The leftmost cell of every group after the first is a type II cell: it also
// takes the CTL of the leftmost cell of the previous group, so a high control
// signal jumps from group to group. For 20 cells the longest path is then 10
// cells instead of 20. The leftmost cell of the first group has no neighbour;
// its left input is tied to 0.
//
// If N is not a multiple of GROUP, the last (least significant) group is the
// shorter one; this is a choice of this implementation, the 40-bit adder has
// equal groups.
//
// Interface: a, b (N-bit low-order operand slices), ctl (N-bit mode vector,
// ctl[i] drives the modified XOR of bit i). Timing: purely combinational.
//
// The cell count, the 5 x 4 grouping, the two cell types and the jump wiring
// follow the published design; tying the first cell's left input to 0 and the
// handling of uneven groups are this implementation's choices.
module control_block #(
  parameter int unsigned N     = eta_pkg::ETA_N_INACC,
  parameter int unsigned GROUP = eta_pkg::CSGC_GROUP
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] ctl
);

  // chain[i] is the CTL of position i; chain[N] is the tied-off input of the
  // leftmost cell.
  logic [N:0] chain;

  assign chain[N] = 1'b0;

  for (genvar i = 0; i < N; i++) begin : g_cell
    if (i != N - 1 && ((N - 1 - i) % GROUP) == 0) begin : g_type2
      csgc_type2 u_csgc (
        .a       (a[i]),
        .b       (b[i]),
        .ctl_left(chain[i+1]),
        .ctl_jump(chain[i+GROUP]),
        .ctl     (chain[i])
      );
    end else begin : g_type1
      csgc_type1 u_csgc (
        .a       (a[i]),
        .b       (b[i]),
        .ctl_left(chain[i+1]),
        .ctl     (chain[i])
      );
    end
  end

  assign ctl = chain[N-1:0];

endmodule
