// node_mem: the memory unit of the ring NoC, one DATA_W-bit register per
// node (64 registers of 256 bits in the main configuration).
//
// Each node's processing element is represented by one register. A register
// is loaded from one of two write ports:
//   port A, the source write: `a_sel` (one-hot, from the address decoder)
//           loads `a_data` into the selected register;
//   port B, the delivery write: `b_valid[i]` loads `b_data[i]` into register
//           i (driven by the destination demultiplexer).
// If both ports hit the same register in one cycle, port A wins (this
// design's choice; the two only meet when an external write and a delivery
// target the same node together).
// `rd_addr` selects the register shown on `rd_data` combinationally.
// `rst` (synchronous, active high) clears every register, as the reset pin
// of the described design clears the memory contents.
// Timing: writes take effect at the rising clock edge; reads are
// asynchronous.
module node_mem #(
  parameter int unsigned NODES  = 64,
  parameter int unsigned DATA_W = 256,
  parameter int unsigned ADDR_W = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [NODES-1:0]  a_sel,
  input  logic [DATA_W-1:0] a_data,
  input  logic [NODES-1:0]  b_valid,
  input  logic [DATA_W-1:0] b_data [NODES],
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [DATA_W-1:0] rd_data
);

  logic [DATA_W-1:0] mem [NODES];

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < NODES; i++) begin
      if (rst)             mem[i] <= '0;
      else if (a_sel[i])   mem[i] <= a_data;
      else if (b_valid[i]) mem[i] <= b_data[i];
    end
  end

  assign rd_data = (32'(rd_addr) < NODES) ? mem[rd_addr] : '0;

  a_onehot_a: assert property (@(posedge clk) disable iff (rst) $onehot0(a_sel))
    else $error("node_mem: more than one source register selected");

endmodule
