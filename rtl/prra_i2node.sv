// prra_i2node: type-2 internal node of the arbitration tree (levels 1 to
// log2(N)-2, between the root and the type-1 nodes).
//
// Purely combinational. It merges the {S1,S0} codes of its two subtrees
// into its own code and steers the grant G from its parent into the subtree
// that holds the winning request:
//   S0  = S0_R | S0_L & ~S1_R
//   S1  = S1_L | S1_R
//   G_L = G & ( S1_L & S0_L | ~S1_R & ~S0_R | S0_L & ~S0_R | S0_L & ~S1_R )
//   G_R = G & ( S1_R & S0_R | ~S1_L & ~S0_L | ~S0_L & S0_R )
// These are the document's simplified equations. The second product term
// of G_L tests the right subtree for being idle (~S1_R & ~S0_R), as the
// document's case analysis and its table of node inputs and outputs
// require; a form with ~S1_L in place of ~S1_R would lose the grant when
// the head's own subtree holds only requests before the head and the rest
// of the ring is idle.
//
// Interface: s_l/s_r codes from the children, g grant from the parent, s
// code to the parent, g_l/g_r grants to the children. No clock.
module prra_i2node
  import prra_pkg::*;
(
  input  scode_t s_l,
  input  scode_t s_r,
  input  logic   g,
  output scode_t s,
  output logic   g_l,
  output logic   g_r
);

  always_comb begin
    s.s0 = s_r.s0 | (s_l.s0 & ~s_r.s1);
    s.s1 = s_l.s1 | s_r.s1;
    g_l  = g & ((s_l.s1 & s_l.s0) | (~s_r.s1 & ~s_r.s0) |
                (s_l.s0 & ~s_r.s0) | (s_l.s0 & ~s_r.s1));
    g_r  = g & ((s_r.s1 & s_r.s0) | (~s_l.s1 & ~s_l.s0) |
                (~s_l.s0 & s_r.s0));
  end

endmodule
