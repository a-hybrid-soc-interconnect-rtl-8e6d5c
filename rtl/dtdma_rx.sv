// dtdma_rx: receiver half of a dTDMA bus interface.
//
// A dtdma_slot_sr, programmed by the arbiter with every timeslot whose
// transmitter addresses this node, marks the slots to listen to. In such a
// slot a valid bus word is written into a receive buffer of RX_DEPTH words at
// the clock edge that ends the slot. The PE reads the buffer through a
// valid/ready port; the word keeps the sender's bus index so messages from
// several senders can be told apart. The bus has no back-pressure, so a word
// that meets a full buffer is dropped and the sticky `overflow` flag is set.
// The buffer depth and the overflow behaviour are this design's choices.
module dtdma_rx
  import hybrid_pkg::*;
#(
  parameter int N        = 9,
  parameter int RX_DEPTH = 8,
  localparam int LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  cfg,
  input  logic [LW-1:0] len_m1,
  input  bus_word_t     bus_word,
  output logic          out_valid,
  input  logic          out_ready,
  output bus_word_t     out_word,
  output logic          overflow,
  output logic          full
);

  logic slot_en, sample, empty;

  dtdma_slot_sr #(.N(N)) u_sr (
    .clk, .rst_n, .load, .cfg, .len_m1, .slot_en);

  assign sample = slot_en && bus_word.vld;

  fifo_sync #(.WIDTH($bits(bus_word_t)), .DEPTH(RX_DEPTH)) u_rxbuf (
    .clk, .rst_n, .push(sample && !full), .din(bus_word), .pop(out_valid && out_ready),
    .dout(out_word), .full, .empty, .count());

  assign out_valid = !empty;

  always_ff @(posedge clk) begin
    if (!rst_n)                                   overflow <= 1'b0;
    else if (sample && full)                      overflow <= 1'b1;
  end

endmodule
