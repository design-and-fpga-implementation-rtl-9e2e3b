// noc_pkg: types and constants shared by the 3D NoC, its routers and the
// AHB/APB protocol interface.
//
// A flit is one word on a router link: the destination (x, y, layer), a tail
// bit that ends the packet, and 16 bits of data. Every flit carries its
// destination, but only the first flit of a packet is routed; the others
// follow it (wormhole switching). The 3-bit x/y fields, the 2-bit layer field
// and the 16-bit data width follow the document; the 25-bit layout and the
// 5-bit router ID (25 routers per layer) are this design's choice.
//
// A packet word, as written over APB and read from the receive FIFO, is
// {router id within the layer, layer, data} in the low 23 bits of a 32-bit bus
// word.
package noc_pkg;

  // Mesh size: 5 x 5 routers per layer, three layers.
  localparam int unsigned MESH_X_DEF = 5;
  localparam int unsigned MESH_Y_DEF = 5;
  localparam int unsigned LAYERS_DEF = 3;

  localparam int unsigned ADDR_W  = 3;   // x-addr and y-addr width
  localparam int unsigned LAYER_W = 2;   // layer select width
  localparam int unsigned DATA_W  = 16;  // payload per packet
  localparam int unsigned ID_W    = 5;   // router id within a layer (0..24)

  // Router ports. T(op) and B(ottom) are the inter-layer ports.
  localparam int unsigned NPORTS = 7;
  typedef enum logic [2:0] {
    P_LOCAL  = 3'd0,
    P_EAST   = 3'd1,   // x + 1
    P_WEST   = 3'd2,   // x - 1
    P_NORTH  = 3'd3,   // y + 1
    P_SOUTH  = 3'd4,   // y - 1
    P_TOP    = 3'd5,   // z + 1
    P_BOTTOM = 3'd6    // z - 1
  } port_e;

  typedef struct packed {
    logic [LAYER_W-1:0] z;
    logic [ADDR_W-1:0]  y;
    logic [ADDR_W-1:0]  x;
  } dest_t;

  typedef struct packed {
    logic              tail;
    dest_t             dest;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);   // 25

  // Packet word layout inside a 32-bit bus word.
  typedef struct packed {
    logic [ID_W-1:0]    id;
    logic [LAYER_W-1:0] layer;
    logic [DATA_W-1:0]  data;
  } pkt_t;

  localparam int unsigned PKT_W = $bits(pkt_t);     // 23

  // Router id within a layer <-> (x, y): id = y * mx + x, mx routers per row.
  function automatic dest_t id_to_dest(logic [ID_W-1:0] id, logic [LAYER_W-1:0] layer,
                                       int unsigned mx);
    dest_t d;
    d.x = ADDR_W'(int'(id) % mx);
    d.y = ADDR_W'(int'(id) / mx);
    d.z = layer;
    return d;
  endfunction

  function automatic logic [ID_W-1:0] dest_to_id(logic [ADDR_W-1:0] x, logic [ADDR_W-1:0] y,
                                                 int unsigned mx);
    return ID_W'(int'(y) * mx + int'(x));
  endfunction

  // The opposite port of a link: what leaves on EAST arrives on WEST.
  function automatic port_e opposite(port_e p);
    case (p)
      P_EAST:   return P_WEST;
      P_WEST:   return P_EAST;
      P_NORTH:  return P_SOUTH;
      P_SOUTH:  return P_NORTH;
      P_TOP:    return P_BOTTOM;
      P_BOTTOM: return P_TOP;
      default:  return P_LOCAL;
    endcase
  endfunction

endpackage
