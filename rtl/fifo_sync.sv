// fifo_sync: synchronous first-in first-out buffer with show-ahead output.
//
// Used as the transmit and receive message buffers of the dTDMA transceivers
// and as the flit buffers of the NoC router inputs. Entries live in a
// circular array addressed by a read and a write pointer; `dout` shows the
// oldest entry whenever `empty` is low. A push and a pop may happen in the
// same cycle, also when the buffer is full; any other push while full, and a
// pop while empty, is ignored and flagged by an assertion. Reset empties the buffer; storage is not cleared.
module fifo_sync #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 8,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [CW-1:0]    cnt_q;
  logic             do_push, do_pop;

  assign full    = (cnt_q == CW'(DEPTH));
  assign empty   = (cnt_q == '0);
  assign count   = cnt_q;
  assign dout    = mem[rd_q];
  assign do_push = push && (!full || pop);
  assign do_pop  = pop && !empty;

  function automatic logic [AW-1:0] incr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_q] <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_push) wr_q <= incr(wr_q);
      if (do_pop)  rd_q <= incr(rd_q);
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  a_no_overrun:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop);
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
