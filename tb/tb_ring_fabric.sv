// tb_ring_fabric: self-check of the 8-node ring (16-bit data). Random
// packets, one at a time, are injected at their source router in the
// direction of the shorter path (worked out in the testbench). Each must
// leave the ring at its destination router, unchanged, exactly as many
// clocks after injection as its hop count; every source/destination pair is
// also sent once in a directed sweep. A second instance is the 8-node
// octagon (cross links on): every pair must arrive in at most 2 hops, using
// the route chosen by ring_route.
module tb_ring_fabric;
  import noc_pkg::*;
  localparam int unsigned NODES = 8, DATA_W = 16, ADDR_W = 3;
  localparam int unsigned PKT_W = 2 * ADDR_W + DATA_W;

  logic clk = 0, rst;
  logic inj_valid, inj_ready, ej_valid;
  logic [NODES-1:0] inj_sel, ej_sel;
  dir_e inj_dir;
  logic [PKT_W-1:0] inj_pkt, ej_pkt;
  int checks = 0, failures = 0;

  ring_fabric #(.NODES(NODES), .DATA_W(DATA_W)) dut (
    .clk(clk), .rst(rst), .inj_valid(inj_valid), .inj_sel(inj_sel), .inj_dir(inj_dir),
    .inj_pkt(inj_pkt), .inj_ready(inj_ready), .ej_valid(ej_valid), .ej_pkt(ej_pkt),
    .ej_sel(ej_sel));

  // Octagon.
  logic o_inj_valid, o_inj_ready, o_ej_valid;
  logic [NODES-1:0] o_inj_sel, o_ej_sel;
  dir_e o_inj_dir, o_dir;
  logic [PKT_W-1:0] o_inj_pkt, o_ej_pkt;
  logic [ADDR_W-1:0] o_src, o_dst;
  logic [ADDR_W:0] o_hops;

  ring_fabric #(.NODES(NODES), .DATA_W(DATA_W), .CROSS_LINKS(1)) dut_oct (
    .clk(clk), .rst(rst), .inj_valid(o_inj_valid), .inj_sel(o_inj_sel), .inj_dir(o_inj_dir),
    .inj_pkt(o_inj_pkt), .inj_ready(o_inj_ready), .ej_valid(o_ej_valid), .ej_pkt(o_ej_pkt),
    .ej_sel(o_ej_sel));
  ring_route #(.NODES(NODES), .CROSS_LINKS(1)) oct_route (
    .src(o_src), .dst(o_dst), .dir(o_dir), .hops(o_hops));

  always #5 clk = ~clk;

  task automatic send_oct(input int s, input int d);
    int fwd, hops, waited;
    logic [PKT_W-1:0] p;
    fwd  = (d - s + NODES) % NODES;
    hops = (fwd <= NODES - fwd) ? fwd : NODES - fwd;
    if (1 + ((fwd >= NODES / 2) ? fwd - NODES / 2 : NODES / 2 - fwd) < hops)
      hops = 1 + ((fwd >= NODES / 2) ? fwd - NODES / 2 : NODES / 2 - fwd);
    p = {ADDR_W'(s), ADDR_W'(d), DATA_W'($urandom)};
    o_src = ADDR_W'(s); o_dst = ADDR_W'(d);
    #1;
    o_inj_valid = 1; o_inj_sel = '0; o_inj_sel[s] = 1'b1; o_inj_pkt = p; o_inj_dir = o_dir;
    #1 check(o_inj_ready, "octagon accepts injection");
    waited = 0;
    while (!o_ej_valid) begin
      @(posedge clk); #1;
      o_inj_valid = 0;
      waited++;
      if (waited > NODES) break;
    end
    check(o_ej_valid && o_ej_pkt == p && o_ej_sel == (NODES'(1) << d),
          $sformatf("octagon %0d->%0d delivered", s, d));
    check(waited == hops && waited <= 2,
          $sformatf("octagon %0d->%0d took %0d clocks for %0d hops", s, d, waited, hops));
    @(posedge clk); #1;
    o_inj_valid = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++) send_oct(s, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic send(input int s, input int d);
    int fwd, hops, waited;
    logic [PKT_W-1:0] p;
    fwd  = (d - s + NODES) % NODES;
    p    = {ADDR_W'(s), ADDR_W'(d), DATA_W'($urandom)};
    inj_valid = 1; inj_sel = '0; inj_sel[s] = 1'b1; inj_pkt = p;
    if (fwd <= NODES - fwd) begin inj_dir = DIR_CW;  hops = fwd; end
    else                    begin inj_dir = DIR_CCW; hops = NODES - fwd; end
    #1 check(inj_ready, "ring accepts injection");
    waited = 0;
    while (!ej_valid) begin
      @(posedge clk); #1;
      inj_valid = 0;
      waited++;
      if (waited > NODES) break;
    end
    check(ej_valid, "packet delivered");
    check(waited == hops, $sformatf("%0d->%0d took %0d clocks for %0d hops", s, d, waited, hops));
    check(ej_pkt == p, "packet unchanged");
    check(ej_sel == (NODES'(1) << d), "delivered at destination router");
    @(posedge clk); #1;
    inj_valid = 0;
    #1 check(!ej_valid, "single delivery");
  endtask

  initial begin
    rst = 1; inj_valid = 0; inj_sel = '0; inj_dir = DIR_CW; inj_pkt = '0;
    o_inj_valid = 0; o_inj_sel = '0; o_inj_dir = DIR_CW; o_inj_pkt = '0; o_src = '0; o_dst = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++) send(s, d);
    for (int k = 0; k < 100; k++) send($urandom % NODES, $urandom % NODES);
    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++) send_oct(s, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
