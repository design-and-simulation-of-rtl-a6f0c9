// tb_dst_demux: self-check of the destination demultiplexer at 64 nodes and
// 256-bit words. For every destination, with valid high and low and a random
// word, it checks that only the addressed output carries valid and the word
// and that all other outputs are zero.
module tb_dst_demux;
  localparam int unsigned NODES  = 64;
  localparam int unsigned DATA_W = 256;
  localparam int unsigned ADDR_W = 6;

  logic              valid;
  logic [ADDR_W-1:0] dst;
  logic [DATA_W-1:0] data;
  logic [NODES-1:0]  out_valid;
  logic [DATA_W-1:0] out_data [NODES];
  int checks = 0, failures = 0;

  dst_demux #(.NODES(NODES), .DATA_W(DATA_W)) dut (
    .valid(valid), .dst(dst), .data(data), .out_valid(out_valid), .out_data(out_data));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      for (int d = 0; d < NODES; d++) begin
        valid = v[0];
        dst   = ADDR_W'(d);
        for (int k = 0; k < DATA_W / 32; k++) data[k*32 +: 32] = $urandom;
        #1;
        for (int i = 0; i < NODES; i++) begin
          logic              ev;
          logic [DATA_W-1:0] ed;
          ev = (v == 1) && (i == d);
          ed = ev ? data : '0;
          checks++;
          if (out_valid[i] !== ev || out_data[i] !== ed) begin
            failures++;
            $display("FAIL valid=%0d dst=%0d out %0d: valid=%0b", v, d, i, out_valid[i]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
