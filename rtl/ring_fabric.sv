// ring_fabric: NODES routers joined in a bidirectional ring (64 in the main
// configuration).
//
// Router i sends clockwise to router (i+1) mod NODES and counter-clockwise
// to router (i-1) mod NODES, so every neighbouring pair is joined by one link
// in each direction. The fabric has a single injection port and a single
// delivery port:
//   inj_sel  one-hot choice of the router where the packet enters (the
//            source node, from the address decoder), with `inj_dir`,
//            `inj_pkt` and the handshake `inj_valid` / `inj_ready`.
//   ej_*     the packet leaving the ring this cycle, merged from all
//            routers; `ej_sel` shows which router delivered it.
// With CROSS_LINKS = 1 (NODES even, at least 4) router i also has a link to
// the opposite router (i + NODES/2) mod NODES; at 8 nodes this is the
// octagon, 8 ring links and 4 cross links, each cross link used in both
// directions.
// A packet travelling h hops leaves the ring h cycles after it entered
// (same cycle for h = 0). The delivery port assumes at most one router
// delivers per cycle, which holds when the user keeps one packet in flight
// at a time (as ring_noc does); an assertion checks it.
// The ring of routers and the octagon's cross links follow the described
// design; the single
// injection/delivery port and merge are this design's own.
module ring_fabric
  import noc_pkg::*;
#(
  parameter int unsigned NODES  = 64,
  parameter int unsigned DATA_W = 256,
  parameter int unsigned ADDR_W = (NODES > 1) ? $clog2(NODES) : 1,
  parameter bit          CROSS_LINKS = 1'b0,
  parameter int unsigned PKT_W  = 2 * ADDR_W + DATA_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             inj_valid,
  input  logic [NODES-1:0] inj_sel,
  input  dir_e             inj_dir,
  input  logic [PKT_W-1:0] inj_pkt,
  output logic             inj_ready,
  output logic             ej_valid,
  output logic [PKT_W-1:0] ej_pkt,
  output logic [NODES-1:0] ej_sel
);

  logic [NODES-1:0] cw_v, ccw_v, x_v, rdy;
  logic [PKT_W-1:0] cw_p [NODES];
  logic [PKT_W-1:0] ccw_p [NODES];
  logic [PKT_W-1:0] x_p [NODES];

  if (CROSS_LINKS && ((NODES % 2) != 0 || NODES < 4)) begin : g_bad_size
    $error("ring_fabric: cross links need an even number of nodes, at least 4");
  end
  logic [PKT_W-1:0] ej_p [NODES];

  for (genvar i = 0; i < NODES; i++) begin : g_router
    localparam int unsigned PREV = (i == 0) ? NODES - 1 : i - 1;
    localparam int unsigned NEXT = (i == NODES - 1) ? 0 : i + 1;
    localparam int unsigned OPP  = (i + NODES / 2) % NODES;

    ring_router #(
      .NODES (NODES), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .ID(i),
      .CROSS_LINKS(CROSS_LINKS), .PKT_W(PKT_W)
    ) u_router (
      .clk          (clk),
      .rst          (rst),
      .cw_in_valid  (cw_v[PREV]),
      .cw_in_pkt    (cw_p[PREV]),
      .ccw_in_valid (ccw_v[NEXT]),
      .ccw_in_pkt   (ccw_p[NEXT]),
      .cross_in_valid(CROSS_LINKS && x_v[OPP]),
      .cross_in_pkt (x_p[OPP]),
      .inj_valid    (inj_valid && inj_sel[i]),
      .inj_dir      (inj_dir),
      .inj_pkt      (inj_pkt),
      .inj_ready    (rdy[i]),
      .cw_out_valid (cw_v[i]),
      .cw_out_pkt   (cw_p[i]),
      .ccw_out_valid(ccw_v[i]),
      .ccw_out_pkt  (ccw_p[i]),
      .cross_out_valid(x_v[i]),
      .cross_out_pkt(x_p[i]),
      .ej_valid     (ej_sel[i]),
      .ej_pkt       (ej_p[i])
    );
  end

  assign inj_ready = |(rdy & inj_sel);
  assign ej_valid  = |ej_sel;

  always_comb begin
    ej_pkt = '0;
    for (int unsigned i = 0; i < NODES; i++) begin
      ej_pkt = ej_pkt | (ej_sel[i] ? ej_p[i] : '0);
    end
  end

  a_one_delivery: assert property (@(posedge clk) disable iff (rst) $onehot0(ej_sel))
    else $error("ring_fabric: more than one router delivered in one cycle");

endmodule
