// prra_rnode: root node of the arbitration tree.
//
// Purely combinational. From the {S1,S0} codes of the two halves of the
// ring it decides in which half the winning request lies; it is the
// type-2 node without the grant input and without the upward code:
//   G_L = S1_L & S0_L | ~S1_R & ~S0_R | S0_L & ~S0_R
//   G_R = S1_R & S0_R | ~S1_L & ~S0_L | ~S0_L & S0_R
// The left half wins when it holds the head and a request at or after it,
// when the right half is completely idle, or when the head is on the right
// with no request at or after it and the left half has a request. As in the
// type-2 node, the second term of G_L tests the right half for being idle
// (~S1_R & ~S0_R), which is what the document's case analysis for the root
// gives and what makes G_L and G_R complementary.
//
// Interface: s_l/s_r codes from the two children, g_l/g_r grants to them.
// Exactly one of g_l/g_r is 1 whenever exactly one head exists.
module prra_rnode
  import prra_pkg::*;
(
  input  scode_t s_l,
  input  scode_t s_r,
  output logic   g_l,
  output logic   g_r
);

  always_comb begin
    g_l = (s_l.s1 & s_l.s0) | (~s_r.s1 & ~s_r.s0) | (s_l.s0 & ~s_r.s0);
    g_r = (s_r.s1 & s_r.s0) | (~s_l.s1 & ~s_l.s0) | (~s_l.s0 & s_r.s0);
  end

endmodule
