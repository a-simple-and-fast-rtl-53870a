// prra_pkg: types shared by the nodes of the parallel round-robin arbiter.
//
// Every internal node of the arbitration tree reports the state of the
// leaves below it to its parent as a two-bit code {S1,S0}:
//   S1 = 1  the leaf holding the head (highest priority) is in this subtree
//   S0 = 1  there is a request in this subtree that lies at or after the
//           head in ring order (when the head is outside the subtree: any
//           request at all)
// so the four codes mean: 00 no head, no request; 01 no head, some request;
// 10 head here, no request at or after it; 11 head here, request at or
// after it. This coding follows the document's table of subtree states.
package prra_pkg;

  typedef struct packed {
    logic s1;  // head inside this subtree
    logic s0;  // a request at or after the head (or any request if no head)
  } scode_t;

endpackage
