// tb_node_mem: self-check of the node register memory at 64 nodes x 256
// bits against a model array. It checks that reset clears every register,
// that the source port (A) and the delivery port (B) each load the selected
// register and no other, that port A wins when both hit the same register,
// and that the read port shows the addressed register.
module tb_node_mem;
  localparam int unsigned NODES = 64, DATA_W = 256, ADDR_W = 6;

  logic clk = 0, rst;
  logic [NODES-1:0]  a_sel, b_valid;
  logic [DATA_W-1:0] a_data, rd_data;
  logic [DATA_W-1:0] b_data [NODES];
  logic [ADDR_W-1:0] rd_addr;
  logic [DATA_W-1:0] model [NODES];
  int checks = 0, failures = 0;

  node_mem #(.NODES(NODES), .DATA_W(DATA_W)) dut (
    .clk(clk), .rst(rst), .a_sel(a_sel), .a_data(a_data), .b_valid(b_valid),
    .b_data(b_data), .rd_addr(rd_addr), .rd_data(rd_data));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] rand_word();
    logic [DATA_W-1:0] w;
    for (int k = 0; k < DATA_W / 32; k++) w[k*32 +: 32] = $urandom;
    return w;
  endfunction

  task automatic check_all(input string when);
    for (int i = 0; i < NODES; i++) begin
      rd_addr = ADDR_W'(i);
      #1;
      checks++;
      if (rd_data !== model[i]) begin
        failures++;
        $display("FAIL %s: node %0d reads %h, expected %h", when, i, rd_data, model[i]);
      end
    end
  endtask

  initial begin
    // Fill the registers through port A, then reset and expect zeros.
    rst = 0; a_sel = '0; b_valid = '0; a_data = '0; rd_addr = '0;
    for (int i = 0; i < NODES; i++) b_data[i] = '0;
    for (int i = 0; i < NODES; i++) begin
      a_sel = '0; a_sel[i] = 1'b1; a_data = rand_word();
      model[i] = a_data;
      @(posedge clk); #1;
    end
    a_sel = '0;
    check_all("after filling");
    rst = 1;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < NODES; i++) model[i] = '0;
    check_all("after reset");

    // Random traffic on both ports.
    for (int cyc = 0; cyc < 400; cyc++) begin
      int a, b;
      a = $urandom % NODES;
      b = ($urandom % 4 == 0) ? a : $urandom % NODES;   // sometimes collide
      a_sel = '0; b_valid = '0;
      if (($urandom % 2) != 0) a_sel[a] = 1'b1;
      if (($urandom % 2) != 0) b_valid[b] = 1'b1;
      a_data = rand_word();
      for (int i = 0; i < NODES; i++) b_data[i] = (i == b) ? rand_word() : '0;
      @(posedge clk);
      if (a_sel[a]) model[a] = a_data;
      if (b_valid[b] && !(a_sel[b])) model[b] = b_data[b];
      #1;
      rd_addr = ADDR_W'($urandom % NODES);
      #1;
      checks++;
      if (rd_data !== model[rd_addr]) begin
        failures++;
        $display("FAIL cycle %0d: node %0d reads %h, expected %h", cyc, rd_addr, rd_data, model[rd_addr]);
      end
    end
    a_sel = '0; b_valid = '0;
    check_all("after random traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
