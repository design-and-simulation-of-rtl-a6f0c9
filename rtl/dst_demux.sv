// dst_demux: 1-to-NODES demultiplexer of the ring NoC datapath (64x1 for 64
// nodes).
//
// Steers one incoming word to exactly one node output, chosen by the
// destination address. The selected node sees `valid` and the word; all
// other outputs carry valid = 0 and an all-zero word. Purely combinational.
//
// In the ring NoC it sits behind the delivery port of the ring: a packet
// leaving the ring is written into the destination node register through
// this demultiplexer. Zeroing the unselected outputs is this design's choice.
module dst_demux #(
  parameter int unsigned NODES  = 64,
  parameter int unsigned DATA_W = 256,
  parameter int unsigned ADDR_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              valid,
  input  logic [ADDR_W-1:0] dst,
  input  logic [DATA_W-1:0] data,
  output logic [NODES-1:0]  out_valid,
  output logic [DATA_W-1:0] out_data [NODES]
);

  always_comb begin
    for (int unsigned i = 0; i < NODES; i++) begin
      out_valid[i] = valid && (dst == ADDR_W'(i));
      out_data[i]  = out_valid[i] ? data : '0;
    end
  end

endmodule
