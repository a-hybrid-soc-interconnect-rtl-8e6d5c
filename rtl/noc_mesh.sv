// noc_mesh: MX x MY mesh of noc_router instances, the NoC backbone.
//
// Router (x, y) has index y*MX + x; its north neighbour is (x, y-1) and its
// east neighbour (x+1, y). Each router's local port is brought out: flits
// injected at loc_in_* with a head-flit destination (x, y) are delivered, in
// order and unbroken, at loc_out_* of router (x, y). Links on the mesh
// boundary are tied off, which XY routing never uses (an assertion checks
// it). The 6 x 6 default is this design's sizing for 32 PEs plus the four
// bridges of the hybrid system.
module noc_mesh
  import hybrid_pkg::*;
#(
  parameter int MX          = 6,
  parameter int MY          = 6,
  parameter int BUF_DEPTH   = 4,
  parameter int LOCAL_DEPTH = 32,
  localparam int NN = MX * MY
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         loc_in_flit   [NN],
  input  logic [NN-1:0] loc_in_valid,
  output logic [NN-1:0] loc_in_ready,
  output flit_t         loc_out_flit  [NN],
  output logic [NN-1:0] loc_out_valid,
  input  logic [NN-1:0] loc_out_ready
);

  flit_t             r_in_flit   [NN][NPORTS];
  logic [NPORTS-1:0] r_in_valid  [NN];
  logic [NPORTS-1:0] r_in_ready  [NN];
  flit_t             r_out_flit  [NN][NPORTS];
  logic [NPORTS-1:0] r_out_valid [NN];
  logic [NPORTS-1:0] r_out_ready [NN];

  for (genvar y = 0; y < MY; y++) begin : g_y
    for (genvar x = 0; x < MX; x++) begin : g_x
      localparam int ID = y * MX + x;

      noc_router #(.BUF_DEPTH(BUF_DEPTH), .LOCAL_DEPTH(LOCAL_DEPTH)) u_rt (
        .clk, .rst_n, .my_x (COORD_W'(x)), .my_y (COORD_W'(y)),
        .in_flit  (r_in_flit[ID]),  .in_valid  (r_in_valid[ID]),  .in_ready  (r_in_ready[ID]),
        .out_flit (r_out_flit[ID]), .out_valid (r_out_valid[ID]), .out_ready (r_out_ready[ID]));

      // local port
      assign r_in_flit[ID][P_LOCAL]   = loc_in_flit[ID];
      assign r_in_valid[ID][P_LOCAL]  = loc_in_valid[ID];
      assign loc_in_ready[ID]         = r_in_ready[ID][P_LOCAL];
      assign loc_out_flit[ID]         = r_out_flit[ID][P_LOCAL];
      assign loc_out_valid[ID]        = r_out_valid[ID][P_LOCAL];
      assign r_out_ready[ID][P_LOCAL] = loc_out_ready[ID];

      // input from the north neighbour (its south output)
      if (y > 0) begin : g_n
        assign r_in_flit[ID][P_NORTH]  = r_out_flit[ID-MX][P_SOUTH];
        assign r_in_valid[ID][P_NORTH] = r_out_valid[ID-MX][P_SOUTH];
        assign r_out_ready[ID][P_NORTH] = r_in_ready[ID-MX][P_SOUTH];
      end else begin : g_n_edge
        assign r_in_flit[ID][P_NORTH]   = '0;
        assign r_in_valid[ID][P_NORTH]  = 1'b0;
        assign r_out_ready[ID][P_NORTH] = 1'b0;
      end
      if (y < MY - 1) begin : g_s
        assign r_in_flit[ID][P_SOUTH]   = r_out_flit[ID+MX][P_NORTH];
        assign r_in_valid[ID][P_SOUTH]  = r_out_valid[ID+MX][P_NORTH];
        assign r_out_ready[ID][P_SOUTH] = r_in_ready[ID+MX][P_NORTH];
      end else begin : g_s_edge
        assign r_in_flit[ID][P_SOUTH]   = '0;
        assign r_in_valid[ID][P_SOUTH]  = 1'b0;
        assign r_out_ready[ID][P_SOUTH] = 1'b0;
      end
      if (x < MX - 1) begin : g_e
        assign r_in_flit[ID][P_EAST]   = r_out_flit[ID+1][P_WEST];
        assign r_in_valid[ID][P_EAST]  = r_out_valid[ID+1][P_WEST];
        assign r_out_ready[ID][P_EAST] = r_in_ready[ID+1][P_WEST];
      end else begin : g_e_edge
        assign r_in_flit[ID][P_EAST]   = '0;
        assign r_in_valid[ID][P_EAST]  = 1'b0;
        assign r_out_ready[ID][P_EAST] = 1'b0;
      end
      if (x > 0) begin : g_w
        assign r_in_flit[ID][P_WEST]   = r_out_flit[ID-1][P_EAST];
        assign r_in_valid[ID][P_WEST]  = r_out_valid[ID-1][P_EAST];
        assign r_out_ready[ID][P_WEST] = r_in_ready[ID-1][P_EAST];
      end else begin : g_w_edge
        assign r_in_flit[ID][P_WEST]   = '0;
        assign r_in_valid[ID][P_WEST]  = 1'b0;
        assign r_out_ready[ID][P_WEST] = 1'b0;
      end

      a_no_edge_exit: assert property (@(posedge clk) disable iff (!rst_n)
        !((y == 0      && r_out_valid[ID][P_NORTH]) ||
          (y == MY - 1 && r_out_valid[ID][P_SOUTH]) ||
          (x == 0      && r_out_valid[ID][P_WEST])  ||
          (x == MX - 1 && r_out_valid[ID][P_EAST])));
    end
  end

endmodule
