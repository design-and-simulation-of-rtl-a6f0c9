// tb_ring_route: exhaustive self-check of shortest-path route selection for
// every source/destination pair of a 64-node ring, of a 6-node ring (a size
// that is not a power of two), and, with cross links, of the 8-node octagon
// and a 64-node ring. The expected first link and hop count are computed
// with integer arithmetic in the testbench; on the octagon no route may be
// longer than 2 hops.
module tb_ring_route;
  import noc_pkg::*;

  logic [5:0] src64, dst64;
  dir_e       dir64;
  logic [6:0] hops64;
  logic [2:0] src6, dst6;
  dir_e       dir6;
  logic [3:0] hops6;
  logic [2:0] src8, dst8;
  dir_e       dir8;
  logic [3:0] hops8;
  logic [5:0] srcx, dstx;
  dir_e       dirx;
  logic [6:0] hopsx;
  int checks = 0, failures = 0;
  int max_oct = 0;

  ring_route #(.NODES(64)) dut64 (.src(src64), .dst(dst64), .dir(dir64), .hops(hops64));
  ring_route #(.NODES(6))  dut6  (.src(src6),  .dst(dst6),  .dir(dir6),  .hops(hops6));
  ring_route #(.NODES(8),  .CROSS_LINKS(1)) dut8 (.src(src8), .dst(dst8), .dir(dir8), .hops(hops8));
  ring_route #(.NODES(64), .CROSS_LINKS(1)) dutx (.src(srcx), .dst(dstx), .dir(dirx), .hops(hopsx));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    for (int s = 0; s < 8; s++)
      for (int d = 0; d < 8; d++) begin
        src8 = 3'(s); dst8 = 3'(d); #1;
        expect_route(8, s, d, dir8, int'(hops8), 1);
        if (int'(hops8) > max_oct) max_oct = int'(hops8);
      end
    checks++;
    if (max_oct != 2) begin
      failures++;
      $display("FAIL octagon longest route %0d hops, expected 2", max_oct);
    end
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++) begin
        srcx = 6'(s); dstx = 6'(d); #1;
        expect_route(64, s, d, dirx, int'(hopsx), 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_route(input int n, input int s, input int d,
                              input dir_e got_dir, input int got_hops,
                              input bit with_cross = 0);
    int fwd, bwd, eh, xh;
    dir_e ed;
    fwd = (d - s + n) % n;
    bwd = (n - fwd) % n;
    if (fwd <= bwd) begin ed = DIR_CW;  eh = fwd; end
    else            begin ed = DIR_CCW; eh = bwd; end
    xh = 1 + ((fwd >= n / 2) ? fwd - n / 2 : n / 2 - fwd);
    if (with_cross && xh < eh) begin ed = DIR_CROSS; eh = xh; end
    checks++;
    if (got_dir != ed || got_hops != eh) begin
      failures++;
      $display("FAIL n=%0d %0d->%0d: dir=%0d hops=%0d exp dir=%0d hops=%0d",
               n, s, d, got_dir, got_hops, ed, eh);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++) begin
        src64 = 6'(s); dst64 = 6'(d); #1;
        expect_route(64, s, d, dir64, int'(hops64));
      end
    for (int s = 0; s < 6; s++)
      for (int d = 0; d < 6; d++) begin
        src6 = 3'(s); dst6 = 3'(d); #1;
        expect_route(6, s, d, dir6, int'(hops6));
      end
    for (int s = 0; s < 8; s++)
      for (int d = 0; d < 8; d++) begin
        src8 = 3'(s); dst8 = 3'(d); #1;
        expect_route(8, s, d, dir8, int'(hops8), 1);
        if (int'(hops8) > max_oct) max_oct = int'(hops8);
      end
    checks++;
    if (max_oct != 2) begin
      failures++;
      $display("FAIL octagon longest route %0d hops, expected 2", max_oct);
    end
    for (int s = 0; s < 64; s++)
      for (int d = 0; d < 64; d++) begin
        srcx = 6'(s); dstx = 6'(d); #1;
        expect_route(64, s, d, dirx, int'(hopsx), 1);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
