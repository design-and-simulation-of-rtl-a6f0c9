// tb_ring_router: directed self-check of one router (ID 5 on an 8-node
// ring, 16-bit data). It covers clockwise and counter-clockwise pass-through
// (one clock per hop), delivery of packets addressed to node 5 from either
// link, injection in both directions, a zero-hop injection that is delivered
// at once, and injection held off while through traffic takes the link.
// A second router with cross links (octagon) is checked for cross-link
// injection, delivery from the cross link, and packets turning from the
// cross link onto the ring in the shorter direction.
module tb_ring_router;
  import noc_pkg::*;
  localparam int unsigned NODES = 8, DATA_W = 16, ADDR_W = 3, ID = 5;
  localparam int unsigned PKT_W = 2 * ADDR_W + DATA_W;

  logic clk = 0, rst;
  logic cw_in_valid, ccw_in_valid, inj_valid, inj_ready;
  logic [PKT_W-1:0] cw_in_pkt, ccw_in_pkt, inj_pkt;
  dir_e inj_dir;
  logic cw_out_valid, ccw_out_valid, ej_valid;
  logic [PKT_W-1:0] cw_out_pkt, ccw_out_pkt, ej_pkt;
  logic nx_out_valid;
  logic [PKT_W-1:0] nx_out_pkt;
  int checks = 0, failures = 0;

  ring_router #(.NODES(NODES), .DATA_W(DATA_W), .ID(ID)) dut (
    .clk(clk), .rst(rst),
    .cw_in_valid(cw_in_valid), .cw_in_pkt(cw_in_pkt),
    .ccw_in_valid(ccw_in_valid), .ccw_in_pkt(ccw_in_pkt),
    .cross_in_valid(1'b0), .cross_in_pkt('0),
    .inj_valid(inj_valid), .inj_dir(inj_dir), .inj_pkt(inj_pkt), .inj_ready(inj_ready),
    .cw_out_valid(cw_out_valid), .cw_out_pkt(cw_out_pkt),
    .ccw_out_valid(ccw_out_valid), .ccw_out_pkt(ccw_out_pkt),
    .cross_out_valid(nx_out_valid), .cross_out_pkt(nx_out_pkt),
    .ej_valid(ej_valid), .ej_pkt(ej_pkt));

  // Octagon router (cross links on), ID 5 as well; its opposite is router 1.
  logic xcw_v, xccw_v, xx_v, xinj_v, xinj_rdy, xcw_ov, xccw_ov, xx_ov, xej_v;
  logic [PKT_W-1:0] xcw_p, xccw_p, xx_p, xinj_p, xcw_op, xccw_op, xx_op, xej_p;
  dir_e xinj_dir;

  ring_router #(.NODES(NODES), .DATA_W(DATA_W), .ID(ID), .CROSS_LINKS(1)) dutx (
    .clk(clk), .rst(rst),
    .cw_in_valid(xcw_v), .cw_in_pkt(xcw_p),
    .ccw_in_valid(xccw_v), .ccw_in_pkt(xccw_p),
    .cross_in_valid(xx_v), .cross_in_pkt(xx_p),
    .inj_valid(xinj_v), .inj_dir(xinj_dir), .inj_pkt(xinj_p), .inj_ready(xinj_rdy),
    .cw_out_valid(xcw_ov), .cw_out_pkt(xcw_op),
    .ccw_out_valid(xccw_ov), .ccw_out_pkt(xccw_op),
    .cross_out_valid(xx_ov), .cross_out_pkt(xx_op),
    .ej_valid(xej_v), .ej_pkt(xej_p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    check(!nx_out_valid, "plain router never drives its cross link");

    // Octagon router.
    xcw_v = 0; xccw_v = 0; xx_v = 0; xinj_v = 0; xinj_dir = DIR_CW;
    xcw_p = '0; xccw_p = '0; xx_p = '0; xinj_p = '0;
    #1;
    // Injection over the cross link: 5 -> 1.
    xinj_v = 1; xinj_dir = DIR_CROSS; xinj_p = mk(5, 1, 'h6C6C); #1;
    check(xinj_rdy && !xej_v, "cross injection accepted");
    @(posedge clk); #1 xinj_v = 0;
    check(xx_ov && xx_op == mk(5, 1, 'h6C6C) && !xcw_ov && !xccw_ov, "cross injection on cross link");
    @(posedge clk); #1;
    check(!xx_ov, "cross link empties");
    // Delivery from the cross link: 1 -> 5.
    xx_v = 1; xx_p = mk(1, 5, 'h7D7D); #1;
    check(xej_v && xej_p == mk(1, 5, 'h7D7D), "deliver from cross link");
    @(posedge clk); #1;
    check(!xcw_ov && !xccw_ov && !xx_ov, "delivered cross packet not forwarded");
    // Turn onto the ring: 1 -> 6 goes clockwise, 1 -> 4 counter-clockwise.
    xx_p = mk(1, 6, 'h8E8E); #1;
    check(!xej_v, "turning packet not delivered");
    @(posedge clk); #1;
    check(xcw_ov && xcw_op == mk(1, 6, 'h8E8E) && !xccw_ov, "cross to clockwise");
    xx_p = mk(1, 4, 'h9F9F);
    @(posedge clk); #1;
    check(xccw_ov && xccw_op == mk(1, 4, 'h9F9F) && !xcw_ov, "cross to counter-clockwise");
    // A turning packet holds off a local injection on the same link.
    xx_p = mk(1, 7, 'hA0A0); xinj_v = 1; xinj_dir = DIR_CW; xinj_p = mk(5, 6, 'hB1B1); #1;
    check(!xinj_rdy, "injection held while a cross packet turns onto the link");
    @(posedge clk); #1 xx_v = 0; xinj_v = 0;
    check(xcw_ov && xcw_op == mk(1, 7, 'hA0A0), "turning packet kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PKT_W-1:0] mk(input int s, input int d, input int data);
    return {ADDR_W'(s), ADDR_W'(d), DATA_W'(data)};
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic idle_inputs();
    cw_in_valid = 0; ccw_in_valid = 0; inj_valid = 0;
    cw_in_pkt = '0; ccw_in_pkt = '0; inj_pkt = '0; inj_dir = DIR_CW;
  endtask

  initial begin
    rst = 1; idle_inputs();
    @(posedge clk); #1 rst = 0;
    check(!cw_out_valid && !ccw_out_valid && !ej_valid, "idle after reset");

    // Clockwise pass-through: 4 -> 7 enters from router 4.
    cw_in_valid = 1; cw_in_pkt = mk(4, 7, 'hA1A1);
    #1 check(!ej_valid, "no delivery of a passing packet");
    @(posedge clk); #1 idle_inputs();
    check(cw_out_valid && cw_out_pkt == mk(4, 7, 'hA1A1) && !ccw_out_valid, "cw forward");
    @(posedge clk); #1;
    check(!cw_out_valid, "link empties after one clock");

    // Counter-clockwise pass-through: 7 -> 2 enters from router 6.
    ccw_in_valid = 1; ccw_in_pkt = mk(7, 2, 'hB2B2);
    @(posedge clk); #1 idle_inputs();
    check(ccw_out_valid && ccw_out_pkt == mk(7, 2, 'hB2B2) && !cw_out_valid, "ccw forward");

    // Delivery from each link.
    cw_in_valid = 1; cw_in_pkt = mk(3, 5, 'hC3C3); #1;
    check(ej_valid && ej_pkt == mk(3, 5, 'hC3C3), "deliver from cw link");
    @(posedge clk); #1;
    check(!cw_out_valid, "delivered packet not forwarded");
    idle_inputs();
    ccw_in_valid = 1; ccw_in_pkt = mk(0, 5, 'hD4D4); #1;
    check(ej_valid && ej_pkt == mk(0, 5, 'hD4D4), "deliver from ccw link");
    @(posedge clk); #1 idle_inputs();

    // Injection in both directions.
    inj_valid = 1; inj_dir = DIR_CW; inj_pkt = mk(5, 1, 'hE5E5); #1;
    check(inj_ready && !ej_valid, "cw injection accepted");
    @(posedge clk); #1 idle_inputs();
    check(cw_out_valid && cw_out_pkt == mk(5, 1, 'hE5E5), "cw injection on link");
    inj_valid = 1; inj_dir = DIR_CCW; inj_pkt = mk(5, 3, 'hF6F6); #1;
    check(inj_ready, "ccw injection accepted");
    @(posedge clk); #1 idle_inputs();
    check(ccw_out_valid && ccw_out_pkt == mk(5, 3, 'hF6F6) && !cw_out_valid, "ccw injection on link");

    // Zero-hop injection is delivered at once.
    inj_valid = 1; inj_dir = DIR_CW; inj_pkt = mk(5, 5, 'h1717); #1;
    check(inj_ready && ej_valid && ej_pkt == mk(5, 5, 'h1717), "zero-hop delivery");
    @(posedge clk); #1 idle_inputs();
    check(!cw_out_valid && !ccw_out_valid, "zero-hop packet not forwarded");

    // Through traffic holds off an injection on the same link.
    cw_in_valid = 1; cw_in_pkt = mk(2, 6, 'h2828);
    inj_valid = 1; inj_dir = DIR_CW; inj_pkt = mk(5, 6, 'h3939); #1;
    check(!inj_ready, "injection held while link busy");
    @(posedge clk); #1;
    check(cw_out_valid && cw_out_pkt == mk(2, 6, 'h2828), "through traffic kept");
    cw_in_valid = 0; #1;
    check(inj_ready, "injection accepted once link is free");
    @(posedge clk); #1 idle_inputs();
    check(cw_out_valid && cw_out_pkt == mk(5, 6, 'h3939), "held packet sent");
    // The other direction stays free for injection.
    cw_in_valid = 1; cw_in_pkt = mk(2, 6, 'h4A4A);
    inj_valid = 1; inj_dir = DIR_CCW; inj_pkt = mk(5, 4, 'h5B5B); #1;
    check(inj_ready, "ccw injection beside cw traffic");
    @(posedge clk); #1 idle_inputs();
    check(cw_out_valid && ccw_out_valid && ccw_out_pkt == mk(5, 4, 'h5B5B), "both links used");

    check(!nx_out_valid, "plain router never drives its cross link");

    // Octagon router.
    xcw_v = 0; xccw_v = 0; xx_v = 0; xinj_v = 0; xinj_dir = DIR_CW;
    xcw_p = '0; xccw_p = '0; xx_p = '0; xinj_p = '0;
    #1;
    // Injection over the cross link: 5 -> 1.
    xinj_v = 1; xinj_dir = DIR_CROSS; xinj_p = mk(5, 1, 'h6C6C); #1;
    check(xinj_rdy && !xej_v, "cross injection accepted");
    @(posedge clk); #1 xinj_v = 0;
    check(xx_ov && xx_op == mk(5, 1, 'h6C6C) && !xcw_ov && !xccw_ov, "cross injection on cross link");
    @(posedge clk); #1;
    check(!xx_ov, "cross link empties");
    // Delivery from the cross link: 1 -> 5.
    xx_v = 1; xx_p = mk(1, 5, 'h7D7D); #1;
    check(xej_v && xej_p == mk(1, 5, 'h7D7D), "deliver from cross link");
    @(posedge clk); #1;
    check(!xcw_ov && !xccw_ov && !xx_ov, "delivered cross packet not forwarded");
    // Turn onto the ring: 1 -> 6 goes clockwise, 1 -> 4 counter-clockwise.
    xx_p = mk(1, 6, 'h8E8E); #1;
    check(!xej_v, "turning packet not delivered");
    @(posedge clk); #1;
    check(xcw_ov && xcw_op == mk(1, 6, 'h8E8E) && !xccw_ov, "cross to clockwise");
    xx_p = mk(1, 4, 'h9F9F);
    @(posedge clk); #1;
    check(xccw_ov && xccw_op == mk(1, 4, 'h9F9F) && !xcw_ov, "cross to counter-clockwise");
    // A turning packet holds off a local injection on the same link.
    xx_p = mk(1, 7, 'hA0A0); xinj_v = 1; xinj_dir = DIR_CW; xinj_p = mk(5, 6, 'hB1B1); #1;
    check(!xinj_rdy, "injection held while a cross packet turns onto the link");
    @(posedge clk); #1 xx_v = 0; xinj_v = 0;
    check(xcw_ov && xcw_op == mk(1, 7, 'hA0A0), "turning packet kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
