// route_compute: the routing-calculation step of a router.
//
// Compares the destination carried by a head flit with this router's own
// (x, y, z) address and returns the output port, correcting one dimension at a
// time: first x (east/west), then y (north/south), then the layer (top/bottom);
// when all three match the flit leaves on the local port. Dimension-ordered
// routing of this kind is minimal and free of deadlock in a mesh. The
// comparison with the router's own address is the document's; the X-Y-Z order
// and the direction conventions (east = +x, north = +y, top = +z) are this
// design's choices. Purely combinational.
module route_compute
  import noc_pkg::*;
#(
  parameter int unsigned MY_X = 0,
  parameter int unsigned MY_Y = 0,
  parameter int unsigned MY_Z = 0
) (
  input  dest_t dest,
  output port_e out_port
);

  always_comb begin
    if      (int'(dest.x) > MY_X) out_port = P_EAST;
    else if (int'(dest.x) < MY_X) out_port = P_WEST;
    else if (int'(dest.y) > MY_Y) out_port = P_NORTH;
    else if (int'(dest.y) < MY_Y) out_port = P_SOUTH;
    else if (int'(dest.z) > MY_Z) out_port = P_TOP;
    else if (int'(dest.z) < MY_Z) out_port = P_BOTTOM;
    else                          out_port = P_LOCAL;
  end

endmodule
