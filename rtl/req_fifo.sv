// req_fifo: first-in first-out queue of transfer requests.
//
// When several requests are waiting for the network, they are served in the
// order in which they arrived (first in, first out). The queue holds DEPTH
// entries of W bits in a circular buffer with read and write pointers and an
// occupancy counter.
//   push/din : enqueue `din` at the rising edge if the queue is not full
//              (a push into a full queue is ignored and flagged on `overflow`
//              for that cycle).
//   pop      : dequeue the head at the rising edge if the queue is not empty.
//   dout     : the head entry, valid while `empty` is low (first-word
//              fall-through: an entry pushed at edge t is visible from t on).
// Push and pop may happen in the same cycle. `rst` is synchronous, active
// high. The FIFO ordering follows the described design; depth, overflow
// behaviour and timing are this design's choices.
module req_fifo #(
  parameter int unsigned W     = 12,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic         overflow,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]     buf_q [DEPTH];
  logic [PTR_W-1:0] rd_ptr, wr_ptr;
  logic             do_push, do_pop;

  assign empty    = (count == '0);
  assign full     = (32'(count) == DEPTH);
  assign do_pop   = pop && !empty;
  assign do_push  = push && (!full || do_pop);
  assign overflow = push && !do_push;
  assign dout     = buf_q[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(input logic [PTR_W-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) begin
        buf_q[wr_ptr] <= din;
        wr_ptr        <= next_ptr(wr_ptr);
      end
      if (do_pop) rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
