// noc_size_run: testbench helper that drives one ring_noc of NODES nodes
// (256-bit data) through random transfers and checks each one: data_out,
// the destination register and a latency of shortest hop count + 1 clocks.
// Node NODES-1 -> node 0 and a half-ring transfer are always included.
// With CROSS = 1 the network has the octagon's cross links and the expected
// hop count allows for them. It
// raises `done` when finished and reports its check and failure counts.
module noc_size_run #(
  parameter int unsigned NODES     = 8,
  parameter int unsigned TRANSFERS = 40,
  parameter bit          CROSS     = 1'b0
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned DATA_W = 256;
  localparam int unsigned ADDR_W = (NODES > 1) ? $clog2(NODES) : 1;

  logic reset, read, write, data_valid, busy, req_full;
  logic [4:0] led_byte_sel;
  logic [7:0] led;
  logic [ADDR_W-1:0] sa, da;
  logic [DATA_W-1:0] data_in, data_out;
  logic [DATA_W-1:0] model [NODES];

  ring_noc #(.NODES(NODES), .CROSS_LINKS(CROSS)) dut (
    .clk(clk), .reset(reset), .source_address(sa), .destination_address(da),
    .read(read), .write(write), .data_in(data_in), .data_out(data_out),
    .data_valid(data_valid), .busy(busy), .req_full(req_full),
    .led_byte_sel(led_byte_sel), .led(led));

  function automatic int hops_of(input int s, input int d);
    int fwd;
    int h, x;
    fwd = (d - s + NODES) % NODES;
    h = (fwd <= NODES - fwd) ? fwd : NODES - fwd;
    x = 1 + ((fwd >= NODES / 2) ? fwd - NODES / 2 : NODES / 2 - fwd);
    return (CROSS && x < h) ? x : h;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL NODES=%0d: %s at %0t", NODES, what, $time);
    end
  endtask

  task automatic transfer(input int s, input int d);
    int cnt;
    logic [DATA_W-1:0] w;
    for (int k = 0; k < DATA_W / 32; k++) w[k*32 +: 32] = $urandom;
    sa = ADDR_W'(s); da = ADDR_W'(d); data_in = w; write = 1; read = 1;
    @(posedge clk); #1;
    write = 0; read = 0;
    model[s] = w;
    cnt = 0;
    do begin
      @(posedge clk); #1;
      cnt++;
    end while (!data_valid && cnt < NODES + 8);
    check(data_valid && cnt == hops_of(s, d) + 1,
          $sformatf("%0d->%0d latency %0d, expected %0d", s, d, cnt, hops_of(s, d) + 1));
    check(data_out == w, $sformatf("%0d->%0d data_out", s, d));
    model[d] = w;
    check(dut.u_mem.mem[d] == w, $sformatf("%0d->%0d destination register", s, d));
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    reset = 1; read = 0; write = 0; sa = '0; da = '0; data_in = '0; led_byte_sel = '0;
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = 0; i < NODES; i++) model[i] = '0;
    transfer(NODES - 1, 0);
    transfer(0, NODES / 2);
    for (int k = 0; k < TRANSFERS; k++) transfer($urandom % NODES, $urandom % NODES);
    for (int i = 0; i < NODES; i++)
      if (i < 2 || ($urandom % 8) == 0)
        check(dut.u_mem.mem[i] == model[i], $sformatf("node %0d", i));
    done = 1;
  end
endmodule
