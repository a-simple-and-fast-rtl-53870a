// prra_i1node: type-1 internal node of the arbitration tree (the level just
// above the leaves).
//
// Purely combinational. Upward it codes the state of its two leaves as
// {S1,S0}; downward it passes the grant G it receives from its parent to at
// most one of the two leaves. The equations are the document's:
//   S0  = R_R | ~H_R & R_L
//   S1  = H_L | H_R
//   G_L = G & R_L & ( H_L | H_R & ~R_R | ~H_L & ~H_R )
//   G_R = G & R_R & ( H_R | H_L & ~R_L | ~H_L & ~H_R & ~R_L )
// A leaf is only granted when it requests. When the head is the right leaf
// the left leaf is granted only if the right one is idle (the ring has
// wrapped around); otherwise the left leaf has priority.
//
// Interface: r_l/h_l and r_r/h_r are request and head of the left and right
// leaf, g is the grant from the parent, s is the code to the parent, g_l/g_r
// the grants to the leaves. No clock; the delay is two gate levels.
module prra_i1node
  import prra_pkg::*;
(
  input  logic   r_l,
  input  logic   h_l,
  input  logic   r_r,
  input  logic   h_r,
  input  logic   g,
  output scode_t s,
  output logic   g_l,
  output logic   g_r
);

  always_comb begin
    s.s0 = r_r | (~h_r & r_l);
    s.s1 = h_l | h_r;
    g_l  = g & r_l & (h_l | (h_r & ~r_r) | (~h_l & ~h_r));
    g_r  = g & r_r & (h_r | (h_l & ~r_l) | (~h_l & ~h_r & ~r_l));
  end

endmodule
