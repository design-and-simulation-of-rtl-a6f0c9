// tb_req_fifo: self-check of the request FIFO (depth 4, 12-bit entries)
// against a queue model in the testbench. Random pushes and pops, with
// stretches that fill and drain it, check the head entry, empty, full,
// overflow and the count each cycle.
module tb_req_fifo;
  localparam int unsigned W = 12, DEPTH = 4;

  logic clk = 0, rst;
  logic push, pop, empty, full, overflow;
  logic [W-1:0] din, dout;
  logic [2:0] count;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0;
  int n_full = 0, n_overflow = 0;

  req_fifo #(.W(W), .DEPTH(DEPTH)) dut (
    .clk(clk), .rst(rst), .push(push), .din(din), .pop(pop), .dout(dout),
    .empty(empty), .full(full), .overflow(overflow), .count(count));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  initial begin
    rst = 1; push = 0; pop = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      int phase;
      phase = (cyc / 100) % 3;   // 0: mostly push, 1: mostly pop, 2: mixed
      push = ($urandom % 10) < (phase == 0 ? 8 : phase == 1 ? 2 : 5);
      pop  = ($urandom % 10) < (phase == 1 ? 8 : phase == 0 ? 2 : 5);
      din  = W'($urandom);
      #1;
      // Combinational outputs against the model before the edge.
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "head entry");
      check(overflow == (push && model.size() == DEPTH && !pop), "overflow");
      if (full) n_full++;
      if (overflow) n_overflow++;
      @(posedge clk);
      begin
        bit do_pop, do_push;
        do_pop  = pop && model.size() > 0;
        do_push = push && (model.size() < DEPTH || do_pop);
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(din);
      end
      #1;
    end
    check(n_full > 0, "queue was never full");
    check(n_overflow > 0, "overflow never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
