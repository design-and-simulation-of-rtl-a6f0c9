// ring_router: one router of the bidirectional ring (router R<ID> serving
// node ID).
//
// Every router has two ring inputs and two ring outputs, one pair per
// direction, an optional pair for the cross link to the opposite node, and
// a local port to its node:
//   cw_in    packet arriving from router ID-1, travelling clockwise
//   ccw_in   packet arriving from router ID+1, travelling counter-clockwise
//   cross_in packet arriving over the cross link from router ID+NODES/2
//   cw_out   link register towards router ID+1
//   ccw_out  link register towards router ID-1
//   cross_out link register towards router ID+NODES/2
//   inj      packet entering the ring here, with its first link `inj_dir`
//   ej       packet leaving the ring here (its destination is this node)
// A packet is {src, dst, data}, packed as src in the top bits, then dst,
// then data (see pkt_t). An arriving packet whose destination is ID is
// ejected in the same cycle. A packet arriving on a ring link and not for
// this node keeps its direction. A packet arriving over the cross link
// continues on the ring in the shorter direction towards its destination
// (clockwise on a tie). Each hop costs one clock. A packet injected with
// destination ID is ejected at once (zero hops).
// Packets already on the ring have priority over injection: `inj_ready` is
// low while the link the local packet needs is taken. Ring through traffic
// also has priority over a packet turning in from the cross link; a packet
// that finds its link taken would be lost, so the router must be used with
// traffic that cannot collide (ring_noc keeps one packet in flight), and an
// assertion flags a collision. Only one packet can be ejected per cycle; an
// assertion flags two.
// With CROSS_LINKS = 0 the cross ports are unused and cross_out is idle.
// Timing: ring outputs are registered, ejection is combinational.
// `rst` (synchronous, active high) empties the link registers.
// The router-per-node ring with two-way links, the octagon's cross links and
// destination-address matching follow the described design; the link
// register per hop, the priority rules and the port layout are this
// design's own.
module ring_router
  import noc_pkg::*;
#(
  parameter int unsigned NODES       = 64,
  parameter int unsigned DATA_W      = 256,
  parameter int unsigned ADDR_W      = (NODES > 1) ? $clog2(NODES) : 1,
  parameter int unsigned ID          = 0,
  parameter bit          CROSS_LINKS = 1'b0,
  parameter int unsigned PKT_W       = 2 * ADDR_W + DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             cw_in_valid,
  input  logic [PKT_W-1:0] cw_in_pkt,
  input  logic             ccw_in_valid,
  input  logic [PKT_W-1:0] ccw_in_pkt,
  input  logic             cross_in_valid,
  input  logic [PKT_W-1:0] cross_in_pkt,
  input  logic             inj_valid,
  input  dir_e             inj_dir,
  input  logic [PKT_W-1:0] inj_pkt,
  output logic             inj_ready,
  output logic             cw_out_valid,
  output logic [PKT_W-1:0] cw_out_pkt,
  output logic             ccw_out_valid,
  output logic [PKT_W-1:0] ccw_out_pkt,
  output logic             cross_out_valid,
  output logic [PKT_W-1:0] cross_out_pkt,
  output logic             ej_valid,
  output logic [PKT_W-1:0] ej_pkt
);

  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [DATA_W-1:0] data;
  } pkt_t;

  localparam logic [ADDR_W-1:0] MY_ADDR = ADDR_W'(ID);
  localparam logic [ADDR_W:0]   N       = (ADDR_W+1)'(NODES);

  pkt_t cw_in, ccw_in, cross_in, inj;
  logic cw_hit, ccw_hit, cross_hit, inj_hit;
  logic cw_pass, ccw_pass, x_cw, x_ccw;
  logic inj_cw, inj_ccw, inj_x;
  logic [ADDR_W:0] x_rel;

  assign cw_in    = pkt_t'(cw_in_pkt);
  assign ccw_in   = pkt_t'(ccw_in_pkt);
  assign cross_in = pkt_t'(cross_in_pkt);
  assign inj      = pkt_t'(inj_pkt);

  assign cw_hit    = cw_in_valid  && (cw_in.dst  == MY_ADDR);
  assign ccw_hit   = ccw_in_valid && (ccw_in.dst == MY_ADDR);
  assign cross_hit = CROSS_LINKS && cross_in_valid && (cross_in.dst == MY_ADDR);
  assign inj_hit   = inj_valid    && (inj.dst    == MY_ADDR);
  assign cw_pass   = cw_in_valid  && !cw_hit;
  assign ccw_pass  = ccw_in_valid && !ccw_hit;

  // A packet off the cross link turns onto the ring the shorter way.
  // x_rel = (dst - ID) mod NODES.
  localparam logic [ADDR_W:0] N_MINUS_ID = N - (ADDR_W+1)'(ID);
  logic [ADDR_W+1:0] x_sum;
  always_comb begin
    x_sum = {2'b00, cross_in.dst} + {1'b0, N_MINUS_ID};
    if (x_sum >= {1'b0, N}) x_rel = (ADDR_W+1)'(x_sum - {1'b0, N});
    else                    x_rel = x_sum[ADDR_W:0];
  end
  assign x_cw  = CROSS_LINKS && cross_in_valid && !cross_hit && (x_rel <= N - x_rel);
  assign x_ccw = CROSS_LINKS && cross_in_valid && !cross_hit && (x_rel >  N - x_rel);

  always_comb begin
    if (inj_hit)                 inj_ready = !(cw_hit || ccw_hit || cross_hit);
    else if (inj_dir == DIR_CW)  inj_ready = !(cw_pass || x_cw);
    else if (inj_dir == DIR_CCW) inj_ready = !(ccw_pass || x_ccw);
    else                         inj_ready = CROSS_LINKS;
  end
  assign inj_cw  = inj_valid && inj_ready && !inj_hit && (inj_dir == DIR_CW);
  assign inj_ccw = inj_valid && inj_ready && !inj_hit && (inj_dir == DIR_CCW);
  assign inj_x   = inj_valid && inj_ready && !inj_hit && (inj_dir == DIR_CROSS);

  // Local delivery.
  always_comb begin
    ej_valid = 1'b1;
    if (cw_hit)                    ej_pkt = cw_in_pkt;
    else if (ccw_hit)              ej_pkt = ccw_in_pkt;
    else if (cross_hit)            ej_pkt = cross_in_pkt;
    else if (inj_hit && inj_ready) ej_pkt = inj_pkt;
    else begin
      ej_valid = 1'b0;
      ej_pkt   = '0;
    end
  end

  // Link registers, one per direction.
  always_ff @(posedge clk) begin
    if (rst) begin
      cw_out_valid    <= 1'b0;
      ccw_out_valid   <= 1'b0;
      cross_out_valid <= 1'b0;
      cw_out_pkt      <= '0;
      ccw_out_pkt     <= '0;
      cross_out_pkt   <= '0;
    end else begin
      cw_out_valid    <= cw_pass || x_cw || inj_cw;
      ccw_out_valid   <= ccw_pass || x_ccw || inj_ccw;
      cross_out_valid <= inj_x;
      if (cw_pass)      cw_out_pkt    <= cw_in_pkt;
      else if (x_cw)    cw_out_pkt    <= cross_in_pkt;
      else if (inj_cw)  cw_out_pkt    <= inj_pkt;
      if (ccw_pass)     ccw_out_pkt   <= ccw_in_pkt;
      else if (x_ccw)   ccw_out_pkt   <= cross_in_pkt;
      else if (inj_ccw) ccw_out_pkt   <= inj_pkt;
      if (inj_x)        cross_out_pkt <= inj_pkt;
    end
  end

  a_one_eject: assert property (@(posedge clk) disable iff (rst)
      $onehot0({cw_hit, ccw_hit, cross_hit}))
    else $error("ring_router %0d: two packets for this node in one cycle", ID);
  a_no_turn_clash: assert property (@(posedge clk) disable iff (rst)
      !(cw_pass && x_cw) && !(ccw_pass && x_ccw))
    else $error("ring_router %0d: packet from the cross link found its ring link taken", ID);

endmodule
