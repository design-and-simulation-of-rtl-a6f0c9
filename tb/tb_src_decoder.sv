// tb_src_decoder: exhaustive self-check of the node address decoder at 64
// nodes. Every address is applied with the enable high and low and the
// output is compared with a one-hot word built in the testbench.
module tb_src_decoder;
  localparam int unsigned NODES  = 64;
  localparam int unsigned ADDR_W = 6;

  logic              en;
  logic [ADDR_W-1:0] addr;
  logic [NODES-1:0]  sel;
  int checks = 0, failures = 0;

  src_decoder #(.NODES(NODES)) dut (.en(en), .addr(addr), .sel(sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NODES-1:0] exp;
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < NODES; a++) begin
        en   = e[0];
        addr = ADDR_W'(a);
        #1;
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        checks++;
        if (sel !== exp) begin
          failures++;
          $display("FAIL en=%0d addr=%0d sel=%h exp=%h", e, a, sel, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
