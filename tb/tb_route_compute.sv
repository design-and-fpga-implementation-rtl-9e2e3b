// tb_route_compute: self-checking test of route_compute.
//
// Three instances at different positions of the 5 x 5 x 3 mesh (a corner,
// the centre of the middle layer and the opposite corner). For every
// destination in the mesh the chosen port is compared with the expected one:
// first the x difference decides (east if larger), then y (north), then the
// layer (top); local when all match. Also walks every destination from every
// source along the chosen ports and checks it arrives in exactly
// |dx|+|dy|+|dz| hops.
module tb_route_compute;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  dest_t d;
  port_e p0, p1, p2;
  route_compute #(.MY_X(0), .MY_Y(0), .MY_Z(0)) u0 (.dest(d), .out_port(p0));
  route_compute #(.MY_X(2), .MY_Y(2), .MY_Z(1)) u1 (.dest(d), .out_port(p1));
  route_compute #(.MY_X(4), .MY_Y(4), .MY_Z(2)) u2 (.dest(d), .out_port(p2));

  function automatic port_e expect_port(int mx, int my, int mz, dest_t t);
    int dx = int'(t.x) - mx, dy = int'(t.y) - my, dz = int'(t.z) - mz;
    if (dx != 0) return dx > 0 ? P_EAST : P_WEST;
    if (dy != 0) return dy > 0 ? P_NORTH : P_SOUTH;
    if (dz != 0) return dz > 0 ? P_TOP : P_BOTTOM;
    return P_LOCAL;
  endfunction

  // Reference walk, using the same rule, to count hops.
  function automatic int hops(int sx, int sy, int sz, dest_t t);
    int n = 0;
    while (n < 20) begin
      port_e p = expect_port(sx, sy, sz, t);
      if (p == P_LOCAL) break;
      case (p)
        P_EAST: sx++; P_WEST: sx--; P_NORTH: sy++; P_SOUTH: sy--;
        P_TOP: sz++; default: sz--;
      endcase
      n++;
    end
    return n;
  endfunction

  initial begin
    for (int z = 0; z < 3; z++)
      for (int y = 0; y < 5; y++)
        for (int x = 0; x < 5; x++) begin
          d = '{z: 2'(z), y: 3'(y), x: 3'(x)};
          #1;
          checks += 3;
          if (p0 != expect_port(0, 0, 0, d)) begin failures++; $display("FAIL u0 %0d%0d%0d", x, y, z); end
          if (p1 != expect_port(2, 2, 1, d)) begin failures++; $display("FAIL u1 %0d%0d%0d", x, y, z); end
          if (p2 != expect_port(4, 4, 2, d)) begin failures++; $display("FAIL u2 %0d%0d%0d", x, y, z); end
        end
    // Spot values written out by hand.
    d = '{z: 2'd2, y: 3'd0, x: 3'd0}; #1; checks++; if (p0 != P_TOP)   begin failures++; $display("FAIL top"); end
    d = '{z: 2'd0, y: 3'd3, x: 3'd2}; #1; checks++; if (p1 != P_NORTH) begin failures++; $display("FAIL north"); end
    d = '{z: 2'd1, y: 3'd2, x: 3'd2}; #1; checks++; if (p1 != P_LOCAL) begin failures++; $display("FAIL local"); end
    d = '{z: 2'd0, y: 3'd4, x: 3'd4}; #1; checks++; if (p2 != P_BOTTOM) begin failures++; $display("FAIL bottom"); end
    d = '{z: 2'd2, y: 3'd4, x: 3'd3}; #1; checks++; if (p2 != P_WEST)  begin failures++; $display("FAIL west"); end
    d = '{z: 2'd2, y: 3'd4, x: 3'd4}; #1; checks++;
    if (hops(0, 0, 0, d) != 10) begin failures++; $display("FAIL hop count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
