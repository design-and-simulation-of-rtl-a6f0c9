// ring_noc: ring network-on-chip joining NODES nodes (64 in the main
// configuration, scalable from 2 to 256) that exchange DATA_W-bit words
// (256 bits in the main configuration).
//
// Each node is represented by one register of the node memory. A transfer
// works in two steps, driven from the pins:
//   write : data_in is stored in the register of node `source_address`
//           (through the source address decoder).
//   read  : a request {source_address, destination_address} is queued. The
//           request at the head of the queue reads the source node's
//           register, forms a packet {src, dst, data} and injects it at the
//           source router. The packet travels around the ring in the
//           shorter direction, one hop per clock, and leaves at the
//           destination router. Through the destination demultiplexer it is
//           written into the destination node's register, and the same word
//           appears on data_out with data_valid high for one cycle.
// write and read may be given in the same cycle; the read then carries the
// newly written word.
//
// Requests are served first in, first out; one packet is on the ring at a
// time. While a packet is in flight further read requests wait in the queue
// (up to FIFO_DEPTH); a read given while `req_full` is high is dropped.
// `busy` is high while a request is queued or a packet is in flight.
// For checking on a board, `led` shows byte `led_byte_sel` of data_out
// (byte 0 = most significant byte), as the delivered word is read off eight
// LEDs one byte at a time.
//
// Timing: a read sampled at rising edge t, with an empty queue and idle
// ring, gives data_valid (and the new data_out) after edge t + h + 1, where
// h is the shortest hop count between the two nodes (at most NODES/2 on the
// plain ring, at most 2 on the octagon): the request is injected in the
// cycle after t and the packet spends one clock per hop. data_out holds its
// value until the next delivery.
// `reset` is synchronous and active high; it clears all node registers,
// data_out, the queue and the ring.
//
// The pin set (clk, reset, source_address, destination_address, read, write,
// data_in, data_out), the node addressing, the packet fields, the node
// register memory with decoder and demultiplexer, shortest-path ring
// routing and first-in first-out service follow the described design. The
// octagon arrangement (CROSS_LINKS = 1: every node also linked to the
// opposite node, so 8 nodes need at most 2 hops) is available as an option;
// the main 64-node configuration is the plain ring (CROSS_LINKS = 0). The
// request queue depth, the one-packet-in-flight policy, the cycle timing and
// the extra status outputs (data_valid, busy, req_full) and the byte order
// of the LED view are this design's.
module ring_noc
  import noc_pkg::*;
#(
  parameter int unsigned NODES      = noc_pkg::NOC_NODES,
  parameter int unsigned DATA_W     = noc_pkg::NOC_DATA_W,
  parameter int unsigned FIFO_DEPTH = 4,
  parameter bit          CROSS_LINKS = 1'b0,
  parameter int unsigned ADDR_W     = (NODES > 1) ? $clog2(NODES) : 1,
  parameter int unsigned LED_SEL_W  = (DATA_W > 8) ? $clog2(DATA_W / 8) : 1
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] source_address,
  input  logic [ADDR_W-1:0] destination_address,
  input  logic              read,
  input  logic              write,
  input  logic [DATA_W-1:0] data_in,
  output logic [DATA_W-1:0] data_out,
  output logic              data_valid,
  output logic              busy,
  output logic              req_full,
  input  logic [LED_SEL_W-1:0] led_byte_sel,
  output logic [7:0]        led
);

  localparam int unsigned PKT_W = 2 * ADDR_W + DATA_W;

  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [DATA_W-1:0] data;
  } pkt_t;

  typedef struct packed {
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
  } req_t;

  typedef enum logic {
    S_IDLE      = 1'b0,
    S_IN_FLIGHT = 1'b1
  } state_e;

  state_e state;

  // ---- Source write path --------------------------------------------------
  logic [NODES-1:0] wr_sel;

  src_decoder #(.NODES(NODES), .ADDR_W(ADDR_W)) u_wr_dec (
    .en  (write),
    .addr(source_address),
    .sel (wr_sel)
  );

  // ---- Request queue --------------------------------------------------------
  req_t head;
  logic fifo_empty, fifo_full, fifo_overflow, pop;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  req_fifo #(.W($bits(req_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst     (reset),
    .push    (read),
    .din     (req_t'{src: source_address, dst: destination_address}),
    .pop     (pop),
    .dout    (head),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .overflow(fifo_overflow),
    .count   (fifo_count)
  );

  // ---- Route of the head request -------------------------------------------
  dir_e            route_dir;
  logic [ADDR_W:0] route_hops;

  ring_route #(.NODES(NODES), .ADDR_W(ADDR_W), .CROSS_LINKS(CROSS_LINKS)) u_route (
    .src (head.src),
    .dst (head.dst),
    .dir (route_dir),
    .hops(route_hops)
  );

  // ---- Node memory ----------------------------------------------------------
  logic [DATA_W-1:0] src_word;
  logic [NODES-1:0]  dlv_valid;
  logic [DATA_W-1:0] dlv_data [NODES];

  node_mem #(.NODES(NODES), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_mem (
    .clk    (clk),
    .rst    (reset),
    .a_sel  (wr_sel),
    .a_data (data_in),
    .b_valid(dlv_valid),
    .b_data (dlv_data),
    .rd_addr(head.src),
    .rd_data(src_word)
  );

  // ---- Injection into the ring ---------------------------------------------
  logic [NODES-1:0] inj_sel;
  logic             inj_valid, inj_ready;
  pkt_t             inj_pkt;

  src_decoder #(.NODES(NODES), .ADDR_W(ADDR_W)) u_inj_dec (
    .en  (1'b1),
    .addr(head.src),
    .sel (inj_sel)
  );

  assign inj_valid = (state == S_IDLE) && !fifo_empty;
  assign inj_pkt   = pkt_t'{src: head.src, dst: head.dst, data: src_word};
  assign pop       = inj_valid && inj_ready;

  // ---- Ring -----------------------------------------------------------------
  logic             ej_valid;
  logic [PKT_W-1:0] ej_bits;
  logic [NODES-1:0] ej_sel;
  pkt_t             ej_pkt;

  ring_fabric #(
    .NODES(NODES), .DATA_W(DATA_W), .ADDR_W(ADDR_W), .CROSS_LINKS(CROSS_LINKS), .PKT_W(PKT_W)
  ) u_ring (
    .clk      (clk),
    .rst      (reset),
    .inj_valid(inj_valid),
    .inj_sel  (inj_sel),
    .inj_dir  (route_dir),
    .inj_pkt  (PKT_W'(inj_pkt)),
    .inj_ready(inj_ready),
    .ej_valid (ej_valid),
    .ej_pkt   (ej_bits),
    .ej_sel   (ej_sel)
  );

  assign ej_pkt = pkt_t'(ej_bits);

  // ---- Delivery to the destination node ------------------------------------
  dst_demux #(.NODES(NODES), .DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_demux (
    .valid    (ej_valid),
    .dst      (ej_pkt.dst),
    .data     (ej_pkt.data),
    .out_valid(dlv_valid),
    .out_data (dlv_data)
  );

  // ---- Board view of the delivered word ----------------------------------
  led_byte_view #(.DATA_W(DATA_W), .SEL_W(LED_SEL_W)) u_led (
    .data    (data_out),
    .byte_sel(led_byte_sel),
    .led     (led)
  );

  // ---- Control --------------------------------------------------------------
  logic [ADDR_W:0] flight_hops;   // hops of the packet in flight
  logic [ADDR_W:0] flight_cnt;    // clocks since it was injected

  always_ff @(posedge clk) begin
    if (reset) begin
      state       <= S_IDLE;
      data_out    <= '0;
      data_valid  <= 1'b0;
      flight_hops <= '0;
      flight_cnt  <= '0;
    end else begin
      data_valid <= ej_valid;
      if (ej_valid) data_out <= ej_pkt.data;
      unique case (state)
        S_IDLE: begin
          if (pop && (route_hops != '0)) begin
            state       <= S_IN_FLIGHT;
            flight_hops <= route_hops;
            flight_cnt  <= (ADDR_W+1)'(1);
          end
        end
        S_IN_FLIGHT: begin
          flight_cnt <= flight_cnt + 1'b1;
          if (ej_valid) state <= S_IDLE;
        end
      endcase
    end
  end

  assign busy     = (state != S_IDLE) || !fifo_empty;
  assign req_full = fifo_full;

  // A packet must arrive after exactly its shortest-path hop count, at the
  // router of its destination.
  a_hop_latency: assert property (@(posedge clk) disable iff (reset)
      (state == S_IN_FLIGHT && ej_valid) |-> (flight_cnt == flight_hops))
    else $error("ring_noc: packet took %0d clocks for %0d hops", flight_cnt, flight_hops);
  a_right_router: assert property (@(posedge clk) disable iff (reset)
      ej_valid |-> (ej_sel == dlv_valid))
    else $error("ring_noc: packet left the ring away from its destination");

endmodule
