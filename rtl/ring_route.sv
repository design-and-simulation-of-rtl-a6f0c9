// ring_route: shortest-path route selection on the ring.
//
// For a packet going from node `src` to node `dst` on a bidirectional ring
// of NODES nodes, it picks the first link to take and reports the total hop
// count. With d = (dst - src) mod NODES the candidate routes are
//   clockwise (node i -> i+1)          : d hops
//   counter-clockwise (node i -> i-1)  : NODES - d hops
//   cross link first, then the ring    : 1 + |d - NODES/2| hops
// where the last one exists only when CROSS_LINKS = 1 (every node also
// linked to the opposite node, as in the octagon: 8 nodes, 8 ring links and
// 4 cross links, at most 2 hops between any pair). The shortest candidate
// wins; ties go to clockwise, then counter-clockwise, then cross. src = dst
// gives 0 hops. After a cross link the rest of the route is a plain ring
// walk, which each router works out from the destination address.
// With CROSS_LINKS = 0 the upper bit of `dir` is always 0 (DIR_CROSS is
// never chosen). Purely combinational. Shortest-path routing and the octagon's cross links
// follow the described design; the tie order is this design's choice.
module ring_route
  import noc_pkg::*;
#(
  parameter int unsigned NODES       = 64,
  parameter int unsigned ADDR_W      = (NODES > 1) ? $clog2(NODES) : 1,
  parameter bit          CROSS_LINKS = 1'b0
) (
  input  logic [ADDR_W-1:0] src,
  input  logic [ADDR_W-1:0] dst,
  output dir_e              dir,
  output logic [ADDR_W:0]   hops
);

  localparam logic [ADDR_W:0] N    = (ADDR_W+1)'(NODES);
  localparam logic [ADDR_W:0] HALF = (ADDR_W+1)'(NODES / 2);

  logic [ADDR_W:0] d_cw, d_ccw, d_cross;

  always_comb begin
    // (dst - src) mod NODES, computed one bit wider so NODES need not be a
    // power of two.
    if (dst >= src) d_cw = {1'b0, dst} - {1'b0, src};
    else            d_cw = {1'b0, dst} + N - {1'b0, src};
    d_ccw   = (d_cw == '0) ? '0 : N - d_cw;
    d_cross = (d_cw >= HALF) ? d_cw - HALF + 1'b1 : HALF - d_cw + 1'b1;
    if (d_cw <= d_ccw) begin
      dir  = DIR_CW;
      hops = d_cw;
    end else begin
      dir  = DIR_CCW;
      hops = d_ccw;
    end
    if (CROSS_LINKS && (d_cross < hops)) begin
      dir  = DIR_CROSS;
      hops = d_cross;
    end
  end

endmodule
