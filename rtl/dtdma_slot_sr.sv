// dtdma_slot_sr: the programmable timeslot shift register of a dTDMA
// transmitter or receiver.
//
// N stages Reg 0 .. Reg N-1. Reg 0 is the head: its output is the enable of
// the transceiver's bus driver (transmitter) or of bus sampling (receiver).
// Every cycle the contents move one stage toward Reg 0, and Reg 0's bit is fed
// back into stage `len_m1`, so the register rotates with a length of
// len_m1+1 timeslots (1 .. N). The last stage shifts in 0. The feedback tap
// is chosen by the log2(N) control lines from the arbiter, decoded here. On
// `load` all stages take the timeslot configuration `cfg` in parallel (bit i
// into Reg i), so the owner of slot 0 is enabled in the cycle right after the
// load. The structure (per-stage multiplexers for parallel load, shift and
// feedback) follows the published transceiver drawing; the length encoding
// (length minus one) and the reset to all zeros are this design's choices.
module dtdma_slot_sr #(
  parameter int N = 9,
  localparam int LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [N-1:0]  cfg,
  input  logic [LW-1:0] len_m1,
  output logic          slot_en
);

  logic [N-1:0] r_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q <= '0;
    end else if (load) begin
      r_q <= cfg;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (LW'(i) == len_m1)  r_q[i] <= r_q[0];       // feedback path
        else if (i == N - 1)   r_q[i] <= 1'b0;         // grounded input
        else                   r_q[i] <= r_q[i+1];     // shift toward head
      end
    end
  end

  assign slot_en = r_q[0];

endmodule
