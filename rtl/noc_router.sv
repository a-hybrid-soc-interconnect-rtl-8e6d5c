// noc_router: five-port mesh router (local, north, east, south, west) for
// packets of 128-bit flits.
//
// Each input has a flit buffer: BUF_DEPTH flits on the four network links and
// LOCAL_DEPTH flits (eight 4-flit messages) on the local injection port.
// Routing is dimension-ordered (XY: first along x, then along y), computed
// from the head flit's destination and remembered for the body flits.
// Switching is wormhole: an output is claimed by the head flit of a packet and
// stays with that input until the tail flit has passed, so packets are never
// interleaved on a link. Free outputs are granted round-robin among the inputs
// whose head flit wants them. A flit at the head of an input buffer leaves in
// the cycle it is granted and its downstream buffer has room (valid/ready),
// so an uncontended hop takes one cycle.
//
// The router's own position comes in on my_x/my_y (tied to constants by the
// mesh), so all routers share one description.
// Buffer sizes and the link width follow the evaluated configuration. The
// published configuration has twelve virtual channels per input, whose
// allocation is not described; this router has one channel per input. XY
// routing, wormhole switching, the handshake and the arbiter are this
// design's choices.
module noc_router
  import hybrid_pkg::*;
#(
  parameter int BUF_DEPTH   = 4,
  parameter int LOCAL_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [COORD_W-1:0] my_x,            // this router's mesh position
  input  logic [COORD_W-1:0] my_y,
  input  flit_t             in_flit  [NPORTS],
  input  logic [NPORTS-1:0] in_valid,
  output logic [NPORTS-1:0] in_ready,
  output flit_t             out_flit [NPORTS],
  output logic [NPORTS-1:0] out_valid,
  input  logic [NPORTS-1:0] out_ready
);

  localparam int PW = $clog2(NPORTS);

  flit_t             head [NPORTS];
  logic [NPORTS-1:0] empty, full, pop;
  port_e             rt      [NPORTS];   // output wanted by each input
  port_e             route_q [NPORTS];   // route of the packet in progress

  logic [NPORTS-1:0] lock_q;             // output held by a packet
  logic [PW-1:0]     owner_q [NPORTS];
  logic [PW-1:0]     rr_q    [NPORTS];   // last input granted, per output
  logic [PW-1:0]     gnt     [NPORTS];
  logic [NPORTS-1:0] gnt_v;

  function automatic port_e xy_route(input logic [COORD_W-1:0] dx,
                                     input logic [COORD_W-1:0] dy);
    if (dx > my_x)      return P_EAST;
    else if (dx < my_x) return P_WEST;
    else if (dy > my_y) return P_SOUTH;
    else if (dy < my_y) return P_NORTH;
    else                    return P_LOCAL;
  endfunction

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    localparam int D = (i == int'(P_LOCAL)) ? LOCAL_DEPTH : BUF_DEPTH;
    fifo_sync #(.WIDTH($bits(flit_t)), .DEPTH(D)) u_buf (
      .clk, .rst_n, .push(in_valid[i] && in_ready[i]), .din(in_flit[i]),
      .pop(pop[i]), .dout(head[i]), .full(full[i]), .empty(empty[i]), .count());
    assign in_ready[i] = !full[i];
    assign rt[i] = head[i].head ? xy_route(head[i].dst.x, head[i].dst.y) : route_q[i];
  end

  // Round-robin pick among request bits, starting after the last grant.
  function automatic logic [PW-1:0] rr_pick(input logic [NPORTS-1:0] req,
                                            input logic [PW-1:0] last);
    logic [PW-1:0] pick;
    int            c;
    pick = '0;
    for (int k = NPORTS; k >= 1; k--) begin
      c = (int'(last) + k) % NPORTS;
      if (req[c]) pick = PW'(c);     // smallest k, i.e. nearest after last, wins
    end
    return pick;
  endfunction

  // Output arbitration.
  logic [NPORTS-1:0] req [NPORTS];

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !empty[i] && head[i].head && rt[i] == port_e'(o);
      if (lock_q[o]) begin
        gnt[o]   = owner_q[o];
        gnt_v[o] = !empty[owner_q[o]];
      end else begin
        gnt[o]   = rr_pick(req[o], rr_q[o]);
        gnt_v[o] = |req[o];
      end
      out_valid[o] = gnt_v[o];
      out_flit[o]  = head[gnt[o]];
      if (gnt_v[o] && out_ready[o]) pop[gnt[o]] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock_q <= '0;
      for (int o = 0; o < NPORTS; o++) begin
        owner_q[o] <= '0;
        rr_q[o]    <= '0;
        route_q[o] <= P_LOCAL;
      end
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        if (gnt_v[o] && out_ready[o]) begin
          lock_q[o]  <= !head[gnt[o]].tail;
          owner_q[o] <= gnt[o];
          if (!lock_q[o]) rr_q[o] <= gnt[o];
        end
      end
      for (int i = 0; i < NPORTS; i++)
        if (pop[i] && head[i].head) route_q[i] <= rt[i];
    end
  end

  // A body flit must follow a head flit of the same input.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_body_locked: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] && !out_flit[o].head |-> lock_q[o]);
  end

endmodule
