// dtdma_tx: transmitter half of a dTDMA bus interface.
//
// Messages from the PE (payload, multi-hot set of local destinations, and a
// global destination for the NoC bridge) enter a transmit buffer of TX_DEPTH
// messages. While the buffer holds a message the transmitter raises `active`
// to ask the arbiter for a timeslot and shows the head message's destination
// set on `dest_req`. `active` rises in the same cycle a message is written,
// so with an idle bus the message is on the bus one cycle later, and it falls
// in the cycle the last buffered message is sent, so the slot is released at
// the following edge.
//
// A dtdma_slot_sr loaded with the arbiter's configuration marks the own
// timeslot. In that slot the head message is driven (`drv_en`, `drv_word`,
// standing in for the tri-state driver) provided its destination set is the
// one the receivers were last programmed with (the set is latched on every
// configuration load) and none of those receivers has a full receive buffer
// (`rx_full`). After a destination change the message therefore waits until
// the arbiter has reprogrammed the receivers, and a full receiver makes the
// transmitter pass its slot and retry one round later. Each message fills
// exactly one slot. The buffer depth follows the evaluated configuration; the
// early release, the destination latch, the full-receiver check and the
// driver model are this design's choices.
module dtdma_tx
  import hybrid_pkg::*;
#(
  parameter int N        = 9,
  parameter int ID       = 0,
  parameter int TX_DEPTH = 8,
  localparam int LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the PE
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [N-1:0]      in_dest,
  input  gaddr_t            in_gdst,
  input  logic [DATA_W-1:0] in_data,
  // to / from the arbiter
  output logic              active,
  output logic [N-1:0]      dest_req,
  input  logic              load,
  input  logic [N-1:0]      cfg,
  input  logic [LW-1:0]     len_m1,
  // receive buffers that are full (one bit per node)
  input  logic [N-1:0]      rx_full,
  // to the bus
  output logic              drv_en,
  output bus_word_t         drv_word
);

  typedef struct packed {
    logic [N-1:0]      dest;
    gaddr_t            gdst;
    logic [DATA_W-1:0] data;
  } txe_t;

  txe_t           head, din;
  logic           full, empty, push, send, slot_en;
  logic [N-1:0]   cur_dest_q;
  logic [$clog2(TX_DEPTH+1)-1:0] count;

  assign din      = '{dest: in_dest, gdst: in_gdst, data: in_data};
  assign in_ready = !full;
  assign push     = in_valid && in_ready;

  fifo_sync #(.WIDTH($bits(txe_t)), .DEPTH(TX_DEPTH)) u_txbuf (
    .clk, .rst_n, .push, .din, .pop(send), .dout(head), .full, .empty, .count);

  dtdma_slot_sr #(.N(N)) u_sr (
    .clk, .rst_n, .load, .cfg, .len_m1, .slot_en);

  assign send     = slot_en && !empty && (head.dest == cur_dest_q) && !(|(head.dest & rx_full));
  assign active   = push || (!empty && !(count == 1 && send));
  assign dest_req = empty ? in_dest : head.dest;

  always_ff @(posedge clk) begin
    if (!rst_n)    cur_dest_q <= '0;
    else if (load) cur_dest_q <= dest_req;
  end

  assign drv_en   = send;
  assign drv_word = send ? '{vld: 1'b1, src: SUB_W'(ID), gdst: head.gdst, data: head.data}
                         : '0;

endmodule
