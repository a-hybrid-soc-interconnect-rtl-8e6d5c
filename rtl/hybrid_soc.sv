// hybrid_soc: dTDMA / NoC hybrid interconnect for a 64-PE system.
//
// PEs that talk to each other a lot are grouped into four affinity groups.
// Each group of N-1 = 8 PEs shares a dTDMA bus with a bridge as its ninth
// node; the bridges and the remaining 32 PEs are the nodes of an MX x MY mesh
// NoC. The four bridges sit on the mesh corners: group 0 at (0,0), group 1 at
// (MX-1,0), group 2 at (0,MY-1), group 3 at (MX-1,MY-1). The other routers, in
// index order (y*MX + x) skipping the corners, serve NoC PEs 0 .. N_NP-1, each
// through a noc_ni.
//
// Addressing: a message carries a global address {x, y, sub}. A group PE
// sends inside its group by giving the multi-hot set of local nodes in
// ag_in_dest (multicast allowed); to leave the group it sets the bridge's
// bit (N-1) and gives the global address in ag_in_gdst, where (x, y) is the
// destination router and `sub` the PE index inside the destination group
// (ignored for a NoC PE). NoC PEs send with np_in_dst the same way.
// Received words for group PEs come out of ag_out_* (with the sender's bus
// index, N-1 when the message came through the bridge); NoC PEs receive on
// np_out_*.
//
// The group and bus sizes follow the evaluated 64-PE system; the 6 x 6
// backbone with bridges at the corners is this design's reading of its
// layout.
module hybrid_soc
  import hybrid_pkg::*;
#(
  parameter int MX          = 6,
  parameter int MY          = 6,
  parameter int N           = 9,    // nodes per dTDMA bus, bridge included
  parameter int TX_DEPTH    = 8,
  parameter int RX_DEPTH    = 8,
  parameter int BUF_DEPTH   = 4,
  parameter int LOCAL_DEPTH = 32,
  localparam int N_AG   = 4,             // one group per mesh corner
  localparam int NPG    = N - 1,         // PEs per group
  localparam int N_AGPE = N_AG * NPG,
  localparam int NN     = MX * MY,
  localparam int N_NP   = NN - N_AG,
  localparam int CW     = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // affinity-group PEs, index g*NPG + j for PE j of group g
  input  logic [N_AGPE-1:0] ag_in_valid,
  output logic [N_AGPE-1:0] ag_in_ready,
  input  logic [N-1:0]      ag_in_dest  [N_AGPE],
  input  gaddr_t            ag_in_gdst  [N_AGPE],
  input  logic [DATA_W-1:0] ag_in_data  [N_AGPE],
  output logic [N_AGPE-1:0] ag_out_valid,
  input  logic [N_AGPE-1:0] ag_out_ready,
  output bus_word_t         ag_out_word [N_AGPE],
  // NoC PEs
  input  logic [N_NP-1:0]   np_in_valid,
  output logic [N_NP-1:0]   np_in_ready,
  input  gaddr_t            np_in_dst   [N_NP],
  input  logic [DATA_W-1:0] np_in_data  [N_NP],
  output logic [N_NP-1:0]   np_out_valid,
  input  logic [N_NP-1:0]   np_out_ready,
  output logic [DATA_W-1:0] np_out_data [N_NP],
  // status
  output logic [CW-1:0]     ag_n_slots  [N_AG],
  output logic [N_AG-1:0]   ag_load,
  output logic [N-1:0]      ag_rx_overflow [N_AG]
);

  // Router index of each group's bridge and of each NoC PE.
  function automatic int corner_id(input int g);
    case (g)
      0:       return 0;
      1:       return MX - 1;
      2:       return (MY - 1) * MX;
      default: return MY * MX - 1;
    endcase
  endfunction

  function automatic bit is_corner(input int id);
    return id == corner_id(0) || id == corner_id(1) || id == corner_id(2) || id == corner_id(3);
  endfunction

  function automatic int np_router(input int k);
    int n;
    n = 0;
    for (int id = 0; id < NN; id++) begin
      if (!is_corner(id)) begin
        if (n == k) return id;
        n++;
      end
    end
    return 0;
  endfunction

  flit_t         loc_in_flit   [NN];
  logic [NN-1:0] loc_in_valid, loc_in_ready;
  flit_t         loc_out_flit  [NN];
  logic [NN-1:0] loc_out_valid, loc_out_ready;

  noc_mesh #(.MX(MX), .MY(MY), .BUF_DEPTH(BUF_DEPTH), .LOCAL_DEPTH(LOCAL_DEPTH)) u_mesh (
    .clk, .rst_n,
    .loc_in_flit, .loc_in_valid, .loc_in_ready,
    .loc_out_flit, .loc_out_valid, .loc_out_ready);

  // ---------------- affinity groups ----------------
  for (genvar g = 0; g < N_AG; g++) begin : g_ag
    localparam int RID = corner_id(g);

    logic [N-1:0]      in_valid, in_ready, out_valid, out_ready;
    logic [N-1:0]      in_dest [N];
    gaddr_t            in_gdst [N];
    logic [DATA_W-1:0] in_data [N];
    bus_word_t         out_word [N];

    for (genvar j = 0; j < NPG; j++) begin : g_pe
      assign in_valid[j]                = ag_in_valid[g*NPG + j];
      assign ag_in_ready[g*NPG + j]     = in_ready[j];
      assign in_dest[j]                 = ag_in_dest[g*NPG + j];
      assign in_gdst[j]                 = ag_in_gdst[g*NPG + j];
      assign in_data[j]                 = ag_in_data[g*NPG + j];
      assign ag_out_valid[g*NPG + j]    = out_valid[j];
      assign out_ready[j]               = ag_out_ready[g*NPG + j];
      assign ag_out_word[g*NPG + j]     = out_word[j];
    end

    dtdma_bus #(.N(N), .TX_DEPTH(TX_DEPTH), .RX_DEPTH(RX_DEPTH)) u_bus (
      .clk, .rst_n,
      .in_valid, .in_ready, .in_dest, .in_gdst, .in_data,
      .out_valid, .out_ready, .out_word,
      .bus (), .load (ag_load[g]), .n_slots (ag_n_slots[g]), .rx_overflow (ag_rx_overflow[g]));

    noc_bridge #(.N(N)) u_bridge (
      .clk, .rst_n,
      .bus_rx_valid   (out_valid[N-1]),
      .bus_rx_ready   (out_ready[N-1]),
      .bus_rx_word    (out_word[N-1]),
      .bus_tx_valid   (in_valid[N-1]),
      .bus_tx_ready   (in_ready[N-1]),
      .bus_tx_dest    (in_dest[N-1]),
      .bus_tx_gdst    (in_gdst[N-1]),
      .bus_tx_data    (in_data[N-1]),
      .flit_out       (loc_in_flit[RID]),
      .flit_out_valid (loc_in_valid[RID]),
      .flit_out_ready (loc_in_ready[RID]),
      .flit_in        (loc_out_flit[RID]),
      .flit_in_valid  (loc_out_valid[RID]),
      .flit_in_ready  (loc_out_ready[RID]));
  end

  // ---------------- NoC PEs ----------------
  for (genvar k = 0; k < N_NP; k++) begin : g_np
    localparam int RID = np_router(k);
    gaddr_t unused_dst;

    noc_ni u_ni (
      .clk, .rst_n,
      .msg_in_valid   (np_in_valid[k]),
      .msg_in_ready   (np_in_ready[k]),
      .msg_in_dst     (np_in_dst[k]),
      .msg_in_data    (np_in_data[k]),
      .msg_out_valid  (np_out_valid[k]),
      .msg_out_ready  (np_out_ready[k]),
      .msg_out_dst    (unused_dst),
      .msg_out_data   (np_out_data[k]),
      .flit_out       (loc_in_flit[RID]),
      .flit_out_valid (loc_in_valid[RID]),
      .flit_out_ready (loc_in_ready[RID]),
      .flit_in        (loc_out_flit[RID]),
      .flit_in_valid  (loc_out_valid[RID]),
      .flit_in_ready  (loc_out_ready[RID]));
  end

endmodule
