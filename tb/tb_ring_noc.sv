// tb_ring_noc: end-to-end self-check of the ring NoC with every parameter at
// its default (64 nodes, 256-bit data, 4-entry request queue).
//
// A model of the 64 node registers is kept in the testbench. The test
//   - resets the design and checks that data_out and every node are zero;
//   - sends the 256-bit ASCII word "TMU@TMU@ComputerTMU@TMU@Computer" from
//     node 1 to node 9 (a write, then a read);
//   - runs directed transfers that go clockwise, counter-clockwise, across
//     half the ring (the tie case) and to the same node (zero hops), plus a
//     write and read given in the same cycle;
//   - runs random transfers; for every transfer it checks data_out, the
//     destination register and the latency, hops + 1 clocks from the edge
//     that samples `read` to data_valid;
//   - issues a burst of reads while a long transfer is in flight, so that
//     requests wait in the queue, the queue fills, and one extra read is
//     dropped; deliveries must come out in request order;
//   - reads the delivered ASCII word off the LED byte view, byte by byte;
//   - finally compares all 64 node registers with the model.
// Each mechanism (clockwise, counter-clockwise, tie, zero hop, same-cycle
// write and read, queued request, full queue, dropped request) is counted
// and a failure is recorded for one that never happened.
module tb_ring_noc;
  import noc_pkg::*;
  localparam int unsigned NODES = 64, DATA_W = 256, ADDR_W = 6;

  logic clk = 0, reset;
  logic [ADDR_W-1:0] source_address, destination_address;
  logic read, write, data_valid, busy, req_full;
  logic [4:0] led_byte_sel;
  logic [7:0] led;
  logic [DATA_W-1:0] data_in, data_out;
  logic [DATA_W-1:0] model [NODES];
  int checks = 0, failures = 0;
  string tmu_text = "TMU@TMU@ComputerTMU@TMU@Computer";
  int n_cw = 0, n_ccw = 0, n_tie = 0, n_zero = 0, n_wr_rd = 0;
  int n_queued = 0, n_full = 0, n_dropped = 0;

  ring_noc dut (
    .clk(clk), .reset(reset), .source_address(source_address),
    .destination_address(destination_address), .read(read), .write(write),
    .data_in(data_in), .data_out(data_out), .data_valid(data_valid), .busy(busy),
    .req_full(req_full),
    .led_byte_sel(led_byte_sel), .led(led));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int k = 0; k < DATA_W / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  // Shortest hop count, worked out independently of the design.
  function automatic int hops_of(input int s, input int d);
    int fwd;
    fwd = (d - s + NODES) % NODES;
    return (fwd <= NODES - fwd) ? fwd : NODES - fwd;
  endfunction

  task automatic count_route(input int s, input int d);
    int fwd;
    fwd = (d - s + NODES) % NODES;
    if (fwd == 0) n_zero++;
    else if (fwd == NODES / 2) n_tie++;
    else if (fwd < NODES - fwd) n_cw++;
    else n_ccw++;
  endtask

  task automatic do_write(input int s, input logic [DATA_W-1:0] w);
    source_address = ADDR_W'(s); data_in = w; write = 1;
    @(posedge clk); #1 write = 0;
    model[s] = w;
  endtask

  // One read (optionally with a write in the same cycle), waited to the end.
  task automatic transfer(input int s, input int d, input bit with_write,
                          input logic [DATA_W-1:0] w);
    int cnt;
    source_address = ADDR_W'(s); destination_address = ADDR_W'(d);
    read = 1;
    if (with_write) begin
      write = 1; data_in = w; n_wr_rd++;
    end
    @(posedge clk); #1;
    read = 0; write = 0;
    if (with_write) model[s] = w;
    cnt = 0;
    do begin
      @(posedge clk); #1;
      cnt++;
    end while (!data_valid && cnt < 200);
    count_route(s, d);
    check(data_valid, $sformatf("transfer %0d->%0d delivered", s, d));
    check(cnt == hops_of(s, d) + 1,
          $sformatf("transfer %0d->%0d latency %0d, expected %0d", s, d, cnt, hops_of(s, d) + 1));
    check(data_out == model[s], $sformatf("transfer %0d->%0d data_out", s, d));
    model[d] = model[s];
    check(dut.u_mem.mem[d] == model[d], $sformatf("transfer %0d->%0d destination register", s, d));
    @(posedge clk); #1;
    check(!data_valid && !busy, "single delivery, then idle");
  endtask

  task automatic check_nodes(input string when);
    for (int i = 0; i < NODES; i++)
      check(dut.u_mem.mem[i] == model[i], $sformatf("%s: node %0d", when, i));
  endtask

  // Burst: reads queue up behind a 32-hop transfer.
  task automatic burst();
    int exp_src [$];
    int exp_dst [$];
    int got;
    // Sources 40..45 hold known words; destinations 50..55 are not sources.
    for (int i = 0; i < 6; i++) do_write(40 + i, rand_word());
    for (int i = 0; i < 6; i++) begin
      source_address = ADDR_W'(40 + i);
      destination_address = ADDR_W'(i == 0 ? 8 : 50 + i);  // 40 -> 8 is 32 hops
      read = 1;
      #1;
      if (busy) n_queued++;
      if (req_full) begin
        n_full++;
        n_dropped++;
      end else begin
        exp_src.push_back(40 + i);
        exp_dst.push_back(int'(destination_address));
      end
      @(posedge clk); #1;
    end
    read = 0;
    check(exp_src.size() == 5, "queue holds four requests behind the one in flight");
    got = 0;
    for (int cyc = 0; cyc < 400 && exp_src.size() > 0; cyc++) begin
      @(posedge clk); #1;
      if (data_valid) begin
        int s, d;
        s = exp_src.pop_front();
        d = exp_dst.pop_front();
        count_route(s, d);
        check(data_out == model[s], $sformatf("burst delivery %0d from node %0d in order", got, s));
        model[d] = model[s];
        got++;
      end
    end
    check(got == 5, "all accepted burst requests delivered");
    repeat (40) @(posedge clk);
    #1 check(!busy && !data_valid, "dropped request never delivered");
  endtask

  initial begin
    logic [DATA_W-1:0] tmu;
    reset = 1; read = 0; write = 0; data_in = '0; led_byte_sel = '0;
    source_address = '0; destination_address = '0;
    repeat (3) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < NODES; i++) model[i] = '0;
    check(data_out == '0 && !data_valid && !busy, "outputs cleared by reset");
    check_nodes("after reset");

    // The ASCII example: node 1 to node 9.
    tmu = "TMU@TMU@ComputerTMU@TMU@Computer";
    check(tmu == 256'h544D5540544D5540436F6D7075746572544D5540544D5540436F6D7075746572,
          "ASCII test word");
    do_write(1, tmu);
    check(dut.u_mem.mem[1] == tmu, "source node 1 loaded");
    transfer(1, 9, 0, '0);
    check(data_out == tmu && dut.u_mem.mem[9] == tmu, "node 9 and data_out hold the word");
    // Read the delivered word off the LEDs, byte by byte.
    for (int k = 0; k < 32; k++) begin
      led_byte_sel = 5'(k);
      #1 check(led == 8'(tmu_text[k]), $sformatf("LED byte %0d", k));
    end

    // Directed routes.
    do_write(10, rand_word());
    transfer(10, 3, 0, '0);             // counter-clockwise, 7 hops
    transfer(3, 35, 0, '0);             // tie, 32 hops
    transfer(20, 20, 1, rand_word());   // zero hops, write and read together
    transfer(63, 0, 1, rand_word());    // clockwise across the wrap
    transfer(0, 63, 0, '0);             // counter-clockwise across the wrap

    // Random transfers.
    for (int k = 0; k < 200; k++) begin
      int s, d;
      s = $urandom % NODES;
      d = $urandom % NODES;
      if (($urandom % 2) != 0) transfer(s, d, 1, rand_word());
      else begin
        if (($urandom % 2) != 0) do_write(s, rand_word());
        transfer(s, d, 0, '0);
      end
    end

    burst();
    check_nodes("at the end");

    check(n_cw > 0, "clockwise route used");
    check(n_ccw > 0, "counter-clockwise route used");
    check(n_tie > 0, "half-ring tie used");
    check(n_zero > 0, "zero-hop transfer used");
    check(n_wr_rd > 0, "write and read in one cycle used");
    check(n_queued > 0, "request queued behind a packet in flight");
    check(n_full > 0, "request queue full");
    check(n_dropped > 0, "request dropped on a full queue");
    $display("mechanisms: cw=%0d ccw=%0d tie=%0d zero=%0d wr+rd=%0d queued=%0d full=%0d dropped=%0d",
             n_cw, n_ccw, n_tie, n_zero, n_wr_rd, n_queued, n_full, n_dropped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
