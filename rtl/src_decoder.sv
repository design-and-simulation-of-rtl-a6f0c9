// src_decoder: address decoder of the ring NoC datapath (6x64 for 64 nodes).
//
// Turns a log2(NODES)-bit node address into a one-hot select with one bit
// per node. When `en` is low every output is low. Purely combinational.
//
// The ring NoC uses it twice: to pick the node register that an external
// write loads (the source node), and to pick the router at which a packet
// enters the ring. A decoder of the node address is part of the described
// datapath; the enable input is this design's own addition.
module src_decoder #(
  parameter int unsigned NODES  = 64,
  parameter int unsigned ADDR_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              en,
  input  logic [ADDR_W-1:0] addr,
  output logic [NODES-1:0]  sel
);

  always_comb begin
    sel = '0;
    for (int unsigned i = 0; i < NODES; i++) begin
      if (en && (addr == ADDR_W'(i))) sel[i] = 1'b1;
    end
  end

endmodule
