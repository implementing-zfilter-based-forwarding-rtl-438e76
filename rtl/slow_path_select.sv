// slow_path_select: delivery to the node's own control processor.
//
// Besides its interfaces, a node can own local Link IDs that name the path
// from the switching fabric to its control processor (the slow path): one
// real local Link ID, unique to the node, and NUM_VLINKS virtual local Link
// IDs that a group of nodes can share, so one control message reaches all of
// them. A packet whose zFilter matches any local Link ID is copied to the
// control processor (`cpu`). By default it is still forwarded on the
// interfaces its zFilter selects; a local Link ID whose bit is set in
// `block_mask` instead stops the packet at this node: when it matches, all
// interface bits are cleared. Combinational; the matchers and the decision
// register sit around it.
module slow_path_select #(
  parameter int unsigned NUM_PORTS   = 4,
  parameter int unsigned NUM_LOCAL   = 2
) (
  input  logic [NUM_PORTS-1:0] port_match,   // forwarding bit-vector of the interfaces
  input  logic [NUM_LOCAL-1:0] local_match,  // matchers of the local Link IDs
  input  logic [NUM_LOCAL-1:0] block_mask,   // local Link IDs that block forwarding
  output logic [NUM_PORTS-1:0] ports,
  output logic                 cpu
);

  logic block;

  assign cpu   = |local_match;
  assign block = |(local_match & block_mask);
  assign ports = block ? '0 : port_match;

endmodule
