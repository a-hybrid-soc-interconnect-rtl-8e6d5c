// dtdma_arbiter: dynamic timeslot allocation for a dTDMA bus of N nodes.
//
// The number of timeslots always equals the number of transmitters that hold
// their `active` request high, so no slot is ever idle for lack of an owner.
// Whenever the set of active transmitters changes, or an active transmitter
// asks for a different destination set, the arbiter computes a new
// configuration during that cycle and pulses `load`; every transceiver takes
// it at the next clock edge. Otherwise the transceivers simply keep rotating.
//
// Allocation policy (as in the published example): transmitters that have
// just become active take the first slots, in node-index order; the
// transmitters that stay keep their cyclic order, continuing with the one
// that would have transmitted next. To know that order the arbiter mirrors the
// transceivers' shift registers as one slot number per node (`slot_q`, 0 =
// transmits in the current cycle) that counts down modulo the slot count.
// A destination change alone keeps every slot and only reprograms receivers.
//
// Outputs: `tx_cfg[p]` is the one-hot slot of transmitter p, `rx_cfg[r]` the
// OR of the slots of all transmitters whose destination set holds r (so a
// receiver may listen to several slots, which gives many-to-one and
// multicast). `len_m1` and `n_slots` are the configuration in force, i.e.
// they change together with the registers that load at the edge after `load`.
// Priority and bandwidth-reservation extensions are not included.
module dtdma_arbiter #(
  parameter int N = 9,
  localparam int LW = (N > 1) ? $clog2(N) : 1,
  localparam int CW = $clog2(N + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  active,
  input  logic [N-1:0]  dest_req [N],
  output logic          load,
  output logic [N-1:0]  tx_cfg [N],
  output logic [N-1:0]  rx_cfg [N],
  output logic [LW-1:0] len_m1,
  output logic [CW-1:0] n_slots
);

  logic [N-1:0]  alloc_q;            // nodes owning a slot
  logic [LW-1:0] slot_q [N];         // their slot number this cycle
  logic [N-1:0]  dest_q [N];         // destination sets programmed
  logic [CW-1:0] cnt_q;              // number of slots in force

  logic [N-1:0]  is_new, is_stay;
  logic [LW-1:0] nxt     [N];        // slot number next cycle, old schedule
  logic [LW-1:0] new_pos [N];
  logic [CW-1:0] n_new, n_stay;
  logic          dest_chg;

  always_comb begin
    is_new   = active & ~alloc_q;
    is_stay  = active & alloc_q;
    n_new    = '0;
    n_stay   = '0;
    dest_chg = 1'b0;
    for (int p = 0; p < N; p++) begin
      n_new  = n_new + CW'(is_new[p]);
      n_stay = n_stay + CW'(is_stay[p]);
      nxt[p] = (slot_q[p] == '0) ? LW'(cnt_q - 1'b1) : slot_q[p] - 1'b1;
      if (is_stay[p] && dest_req[p] != dest_q[p]) dest_chg = 1'b1;
    end
    for (int p = 0; p < N; p++) begin
      new_pos[p] = '0;
      for (int q = 0; q < N; q++) begin
        if (is_new[p] && is_new[q] && q < p) new_pos[p] = new_pos[p] + 1'b1;
        if (is_stay[p] && is_stay[q] && nxt[q] < nxt[p]) new_pos[p] = new_pos[p] + 1'b1;
      end
      if (is_stay[p]) new_pos[p] = new_pos[p] + LW'(n_new);
    end
    load = (|is_new) || (|(alloc_q & ~active)) || dest_chg;
  end

  always_comb begin
    for (int p = 0; p < N; p++) begin
      tx_cfg[p] = '0;
      if (active[p]) tx_cfg[p][new_pos[p]] = 1'b1;
    end
    for (int r = 0; r < N; r++) begin
      rx_cfg[r] = '0;
      for (int p = 0; p < N; p++)
        if (active[p] && dest_req[p][r]) rx_cfg[r][new_pos[p]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alloc_q <= '0;
      cnt_q   <= '0;
      for (int p = 0; p < N; p++) begin
        slot_q[p] <= '0;
        dest_q[p] <= '0;
      end
    end else if (load) begin
      alloc_q <= active;
      cnt_q   <= n_new + n_stay;
      for (int p = 0; p < N; p++) begin
        slot_q[p] <= new_pos[p];
        dest_q[p] <= dest_req[p];
      end
    end else begin
      for (int p = 0; p < N; p++) slot_q[p] <= nxt[p];
    end
  end

  assign n_slots = cnt_q;
  assign len_m1  = (cnt_q == '0) ? '0 : LW'(cnt_q - 1'b1);

endmodule
