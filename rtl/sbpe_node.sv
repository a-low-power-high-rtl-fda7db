// sbpe_node -- one node of the synchronized binary-tree priority encoder.
//
// Requests travel from the pixels toward the root: the node's request is the
// OR of its two children's requests. Selection travels the opposite way: the
// path from the root (sel_in) and the readOutControl pulse (roc_in) are passed
// on to the "hi" child (the one holding the higher pixel addresses) when that
// child requests, and to the "lo" child otherwise. Higher addresses therefore
// win, and a node whose children are both idle steers toward its lowest pixel,
// which is why an idle tree ends up selecting pixel 0.
//
// The node also contributes one address bit: LEVEL is the node's height above
// the pixels (1 for a node whose children are pixels), and bit LEVEL-1 of the
// address is 1 when the hi child wins. The lower bits come from the winning
// child, so bits near the root settle first.
//
// All of this is combinational; the only timing is the depth of the tree. In
// a physical layout the OR would be built from alternating NOR and NAND
// levels; here it is written as plain logic. The address bits can be left
// unconnected when only full-frame readout is needed.
module sbpe_node #(
  parameter int unsigned AW    = 9,  // width of the address bus carried up the tree
  parameter int unsigned LEVEL = 1   // height of this node, 1 .. AW
) (
  input  logic          req_lo,   // request of the lower-address child
  input  logic          req_hi,   // request of the higher-address child
  output logic          req_up,   // request toward the root
  input  logic          sel_in,   // selection path arriving from the root
  output logic          sel_lo,
  output logic          sel_hi,
  input  logic          roc_in,   // readOutControl arriving from the root
  output logic          roc_lo,
  output logic          roc_hi,
  input  logic [AW-1:0] addr_lo,  // address of the winner below the lo child
  input  logic [AW-1:0] addr_hi,  // address of the winner below the hi child
  output logic [AW-1:0] addr_up   // address of the winner below this node
);

  always_comb begin
    req_up = req_lo | req_hi;
    sel_hi = sel_in &  req_hi;
    sel_lo = sel_in & ~req_hi;
    roc_hi = roc_in &  req_hi;
    roc_lo = roc_in & ~req_hi;
    addr_up = req_hi ? addr_hi : addr_lo;
    addr_up[LEVEL-1] = req_hi;
  end

endmodule
