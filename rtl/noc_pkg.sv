// noc_pkg: packet format shared by the tile's network interface and the NoC
// side of the tile.
//
// The tile reaches external memory through a mesh NoC with static XY routing
// and the NoC-AXI interface. Each transaction here is a single flit carrying
// the destination and source mesh coordinates, the packet kind, a 32-bit byte
// address and one 32-bit data word: a read request, a write request, a read
// response (data) or a write acknowledge. The document names the NoC and its
// routing but not a packet format; this format is this design's.
package noc_pkg;

  localparam int unsigned COORD_W = 4;

  typedef enum logic [1:0] {
    PKT_RD_REQ  = 2'd0,
    PKT_WR_REQ  = 2'd1,
    PKT_RD_RESP = 2'd2,
    PKT_WR_ACK  = 2'd3
  } pkt_kind_e;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    pkt_kind_e          kind;
    logic [31:0]        addr;   // byte address in external memory
    logic [31:0]        data;
  } flit_t;

endpackage
