// dtdma_bus: a complete dynamic-TDMA bus for N nodes.
//
// Every node has a transmitter (dtdma_tx) and a receiver (dtdma_rx); one
// dtdma_arbiter programs them all. The bus itself is a single broadcast
// medium, BUS_W = $bits(bus_word_t) wires, that the transmitter owning the
// current timeslot drives; the tri-state drivers of a physical bus are
// modelled as an OR of gated words, and an assertion checks that at most one
// transmitter drives in any cycle. Each receiver reports a full receive
// buffer on one line of `rx_full`, and a transmitter whose destinations
// include a full receiver passes its slot, so no word is lost when a PE (or
// a bridge facing a busy NoC) reads slowly; this back-pressure is an
// addition of this design. Messages are never addressed by memory
// location: a PE names its destination nodes as a multi-hot vector, so
// multicast costs nothing extra.
//
// Timing: a message written at node p in cycle t while the bus is idle is
// driven in cycle t+1 and is in the destination's receive buffer after the
// edge ending t+1. With k active transmitters each gets every k-th cycle, so
// a head message never waits more than k cycles for its slot.
//
// Status outputs: `bus` (the word on the bus this cycle), `load` (a new
// configuration is taken at the next edge), `n_slots` (timeslots in force)
// and the receivers' sticky overflow flags.
module dtdma_bus
  import hybrid_pkg::*;
#(
  parameter int N        = 9,
  parameter int TX_DEPTH = 8,
  parameter int RX_DEPTH = 8,
  localparam int LW = (N > 1) ? $clog2(N) : 1,
  localparam int CW = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // message input, one port per node
  input  logic [N-1:0]      in_valid,
  output logic [N-1:0]      in_ready,
  input  logic [N-1:0]      in_dest [N],
  input  gaddr_t            in_gdst [N],
  input  logic [DATA_W-1:0] in_data [N],
  // message output, one port per node
  output logic [N-1:0]      out_valid,
  input  logic [N-1:0]      out_ready,
  output bus_word_t         out_word [N],
  // status
  output bus_word_t         bus,
  output logic              load,
  output logic [CW-1:0]     n_slots,
  output logic [N-1:0]      rx_overflow
);

  logic [N-1:0]  active;
  logic [N-1:0]  dest_req [N];
  logic [N-1:0]  tx_cfg   [N];
  logic [N-1:0]  rx_cfg   [N];
  logic [LW-1:0] len_m1;
  logic [N-1:0]  drv_en;
  logic [N-1:0]  rx_full;
  bus_word_t     drv_word [N];

  dtdma_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .active, .dest_req, .load, .tx_cfg, .rx_cfg, .len_m1, .n_slots);

  for (genvar p = 0; p < N; p++) begin : g_node
    dtdma_tx #(.N(N), .ID(p), .TX_DEPTH(TX_DEPTH)) u_tx (
      .clk, .rst_n,
      .in_valid (in_valid[p]), .in_ready (in_ready[p]), .in_dest (in_dest[p]),
      .in_gdst  (in_gdst[p]),  .in_data  (in_data[p]),
      .active   (active[p]),   .dest_req (dest_req[p]),
      .load, .cfg (tx_cfg[p]), .len_m1, .rx_full,
      .drv_en   (drv_en[p]),   .drv_word (drv_word[p]));

    dtdma_rx #(.N(N), .RX_DEPTH(RX_DEPTH)) u_rx (
      .clk, .rst_n, .load, .cfg (rx_cfg[p]), .len_m1, .bus_word (bus),
      .out_valid (out_valid[p]), .out_ready (out_ready[p]), .out_word (out_word[p]),
      .overflow  (rx_overflow[p]), .full (rx_full[p]));
  end

  // Broadcast medium: the slot owner's word, all zero in an idle cycle.
  always_comb begin
    bus = '0;
    for (int p = 0; p < N; p++) bus = bus | drv_word[p];
  end

  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(drv_en));

endmodule
