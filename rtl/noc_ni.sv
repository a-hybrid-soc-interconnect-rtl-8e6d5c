// noc_ni: network interface between a message port (512-bit messages) and a
// router's local port (128-bit flits).
//
// Send side: a message accepted on msg_in_* is held in a register and sent as
// a FLITS_PER_MSG-flit packet, lowest 128 bits first; the first flit is
// marked head and carries the destination address, the last is marked tail.
// A new message is accepted in the cycle the last flit leaves, so a steady
// stream of messages keeps the link busy. Receive side: flits from the router are
// collected into a message register; after the tail flit the message is
// offered on msg_out_* together with the head flit's address, and no further
// flit is accepted until it has been taken. The flit count per message
// follows from the evaluated widths; the packet format is this design's.
module noc_ni
  import hybrid_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // message side
  input  logic              msg_in_valid,
  output logic              msg_in_ready,
  input  gaddr_t            msg_in_dst,
  input  logic [DATA_W-1:0] msg_in_data,
  output logic              msg_out_valid,
  input  logic              msg_out_ready,
  output gaddr_t            msg_out_dst,
  output logic [DATA_W-1:0] msg_out_data,
  // router local port
  output flit_t             flit_out,
  output logic              flit_out_valid,
  input  logic              flit_out_ready,
  input  flit_t             flit_in,
  input  logic              flit_in_valid,
  output logic              flit_in_ready
);

  localparam int FW = (FLITS_PER_MSG > 1) ? $clog2(FLITS_PER_MSG) : 1;

  // ---- packetizer ----
  logic              tx_busy_q;
  logic [FW-1:0]     tx_cnt_q;
  gaddr_t            tx_dst_q;
  logic [DATA_W-1:0] tx_data_q;

  // a new message may enter in the cycle the previous tail flit leaves
  assign msg_in_ready   = !tx_busy_q || (flit_out_ready && flit_out.tail);
  assign flit_out_valid = tx_busy_q;
  assign flit_out.head  = (tx_cnt_q == '0);
  assign flit_out.tail  = (tx_cnt_q == FW'(FLITS_PER_MSG - 1));
  assign flit_out.dst   = tx_dst_q;
  assign flit_out.data  = tx_data_q[tx_cnt_q*FLIT_W +: FLIT_W];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_busy_q <= 1'b0;
      tx_cnt_q  <= '0;
      tx_dst_q  <= '0;
      tx_data_q <= '0;
    end else if (msg_in_valid && msg_in_ready) begin
      tx_busy_q <= 1'b1;
      tx_cnt_q  <= '0;
      tx_dst_q  <= msg_in_dst;
      tx_data_q <= msg_in_data;
    end else if (tx_busy_q && flit_out_ready) begin
      tx_cnt_q <= tx_cnt_q + 1'b1;
      if (flit_out.tail) tx_busy_q <= 1'b0;
    end
  end

  // ---- reassembly ----
  logic              rx_done_q;
  logic [FW-1:0]     rx_cnt_q;
  gaddr_t            rx_dst_q;
  logic [DATA_W-1:0] rx_data_q;

  assign flit_in_ready = !rx_done_q;
  assign msg_out_valid = rx_done_q;
  assign msg_out_dst   = rx_dst_q;
  assign msg_out_data  = rx_data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_done_q <= 1'b0;
      rx_cnt_q  <= '0;
      rx_dst_q  <= '0;
      rx_data_q <= '0;
    end else if (rx_done_q) begin
      if (msg_out_ready) rx_done_q <= 1'b0;
    end else if (flit_in_valid) begin
      rx_data_q[rx_cnt_q*FLIT_W +: FLIT_W] <= flit_in.data;
      if (flit_in.head) rx_dst_q <= flit_in.dst;
      if (flit_in.tail) begin
        rx_done_q <= 1'b1;
        rx_cnt_q  <= '0;
      end else begin
        rx_cnt_q  <= rx_cnt_q + 1'b1;
      end
    end
  end

  a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
    flit_in_valid && flit_in_ready |-> (flit_in.head == (rx_cnt_q == '0)));

endmodule
