// noc_bridge: joins an affinity group's dTDMA bus to the NoC backbone.
//
// The bridge is one node of the bus (by convention the last, N-1) and one
// local port of a mesh router. Bus -> NoC: every word the bus delivers to the
// bridge's receiver is a message for a PE outside the group; its global
// destination becomes the destination of a NoC packet built by a noc_ni.
// NoC -> bus: a packet arriving from the NoC is reassembled and written into
// the bridge's bus transmitter with a one-hot local destination taken from
// the address index `sub`, so it reaches that PE in the bridge's next
// timeslot. The bridge generates no traffic of its own. Using one bridge node
// per group follows the evaluated configuration; the address translation is
// this design's.
module noc_bridge
  import hybrid_pkg::*;
#(
  parameter int N = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // bus side: the bridge node's receive port ...
  input  logic              bus_rx_valid,
  output logic              bus_rx_ready,
  input  bus_word_t         bus_rx_word,
  // ... and its transmit port
  output logic              bus_tx_valid,
  input  logic              bus_tx_ready,
  output logic [N-1:0]      bus_tx_dest,
  output gaddr_t            bus_tx_gdst,
  output logic [DATA_W-1:0] bus_tx_data,
  // NoC side: the router's local port
  output flit_t             flit_out,
  output logic              flit_out_valid,
  input  logic              flit_out_ready,
  input  flit_t             flit_in,
  input  logic              flit_in_valid,
  output logic              flit_in_ready
);

  gaddr_t msg_out_dst;

  noc_ni u_ni (
    .clk, .rst_n,
    .msg_in_valid  (bus_rx_valid),
    .msg_in_ready  (bus_rx_ready),
    .msg_in_dst    (bus_rx_word.gdst),
    .msg_in_data   (bus_rx_word.data),
    .msg_out_valid (bus_tx_valid),
    .msg_out_ready (bus_tx_ready),
    .msg_out_dst,
    .msg_out_data  (bus_tx_data),
    .flit_out, .flit_out_valid, .flit_out_ready,
    .flit_in,  .flit_in_valid,  .flit_in_ready);

  always_comb begin
    bus_tx_dest = '0;
    if (int'(msg_out_dst.sub) < N - 1) bus_tx_dest[msg_out_dst.sub] = 1'b1;
  end
  assign bus_tx_gdst = msg_out_dst;

  a_sub_in_group: assert property (@(posedge clk) disable iff (!rst_n)
    bus_tx_valid |-> int'(msg_out_dst.sub) < N - 1);

endmodule
