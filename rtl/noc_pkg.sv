// noc_pkg: constants and types shared by the ring network-on-chip.
//
// The network joins NOC_NODES nodes (64 in the main configuration, 2 to 256
// are supported through the modules' NODES parameter) in a bidirectional
// ring. Each node is addressed by a log2(NODES)-bit number (6 bits for 64
// nodes, node 0 = 000000 ... node 63 = 111111) and holds one data word of
// NOC_DATA_W bits (256 in the main configuration). A packet carries the
// source address, the destination address and the data word.
//
// The direction encoding is this design's own: clockwise means from node i
// to node i+1 (mod NODES), counter-clockwise from node i to node i-1, and
// cross means over the optional link from node i to the opposite node
// i+NODES/2 (the extra links of the octagon arrangement).
package noc_pkg;

  localparam int unsigned NOC_NODES  = 64;
  localparam int unsigned NOC_DATA_W = 256;

  // Travel direction of a packet on the ring.
  typedef enum logic [1:0] {
    DIR_CW    = 2'd0,   // node i -> node i+1
    DIR_CCW   = 2'd1,   // node i -> node i-1
    DIR_CROSS = 2'd2    // node i -> node i+NODES/2 (cross link)
  } dir_e;

endpackage
