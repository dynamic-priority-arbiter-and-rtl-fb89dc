// cmp_node: one comparison node of the sorting-based fixed-priority arbiter.
//
// Fixed-priority arbitration is treated as finding the maximum of single-bit
// numbers, the rightmost one winning ties. A node compares the number from
// its left subtree (higher positions), s_l, with the one from its right
// subtree (lower positions), s_r. Its maximum is s_l | s_r. Its direction
// flag f says where the maximum came from: 1 = left, 0 = right. A tie of two
// ones must go right. A tie of two zeros is a don't-care, so it is also
// flagged left, and f reduces to a single inverter: f = ~s_r. Both the OR and
// the inverter follow the node drawn for the merged arbiter-multiplexer.
//
// Purely combinational.
module cmp_node (
  input  logic s_l,   // single-bit number from the left (higher) subtree
  input  logic s_r,   // single-bit number from the right (lower) subtree
  output logic max,   // maximum of the two
  output logic f      // direction flag: 1 selects left, 0 selects right
);

  always_comb begin
    max = s_l | s_r;
    f   = ~s_r;
  end

endmodule
