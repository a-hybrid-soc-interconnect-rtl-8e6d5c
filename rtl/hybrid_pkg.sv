// hybrid_pkg: types and sizes shared by the dTDMA bus, the mesh NoC and the
// bridges that join them.
//
// A message is 512 bits wide, which is both the dTDMA bus width and four
// 128-bit NoC flits; both widths are the ones the design is evaluated with.
// A global address names a NoC router by its mesh coordinates plus an index
// (`sub`) that selects a PE inside the affinity group hanging off that router
// (ignored for routers that serve a single PE). The bus word carries, next to
// the payload, a valid bit, the sending bus index and the global destination;
// these sideband fields and all field widths are choices of this design.
package hybrid_pkg;

  localparam int DATA_W        = 512;             // dTDMA bus / message width
  localparam int FLIT_W        = 128;             // NoC link width
  localparam int FLITS_PER_MSG = DATA_W / FLIT_W; // 4 flits per message
  localparam int COORD_W       = 3;               // mesh up to 8 x 8
  localparam int SUB_W         = 4;               // bus index, up to 16 nodes

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [SUB_W-1:0]   sub;
  } gaddr_t;

  // One timeslot's worth of data on the dTDMA bus.
  typedef struct packed {
    logic              vld;   // a transmitter drove the bus in this slot
    logic [SUB_W-1:0]  src;   // bus index of the sender (start/end marker)
    gaddr_t            gdst;  // final destination, used by the NoC bridge
    logic [DATA_W-1:0] data;
  } bus_word_t;

  typedef struct packed {
    logic              head;
    logic              tail;
    gaddr_t            dst;   // valid in the head flit
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Router port numbering.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // toward y-1
    P_EAST  = 3'd2,   // toward x+1
    P_SOUTH = 3'd3,   // toward y+1
    P_WEST  = 3'd4    // toward x-1
  } port_e;

  localparam int NPORTS = 5;

endpackage
