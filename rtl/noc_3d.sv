// noc_3d: the three-dimensional mesh of FREDO routers.
//
// MESH_X x MESH_Y routers per layer (5 x 5), LAYERS layers (3): 75 routers.
// Router (x, y, z) has index z*MESH_X*MESH_Y + y*MESH_X + x and is linked to
// its east/west, north/south and top/bottom neighbours by a pair of
// one-way links, each with its own stall signal going back. Links that would
// leave the mesh do not exist: their inputs are tied idle and their outputs
// are held stalled (dimension-ordered routing never selects them). The local
// port of every router is brought out as flat per-router arrays, for
// injection (local_in_*) and ejection (local_out_*).
//
// Latency: a flit injected at a clock edge with no contention reaches the
// destination's local output hops + 1 edges later, one cycle per router.
// The 5 x 5 x 3 size, the mesh topology and the removed edge links follow the
// document; the index order is this design's choice.
module noc_3d
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = noc_pkg::MESH_X_DEF,
  parameter int unsigned MESH_Y    = noc_pkg::MESH_Y_DEF,
  parameter int unsigned LAYERS    = noc_pkg::LAYERS_DEF,
  parameter bit          BUFFERED  = 1'b1,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned NR       = MESH_X * MESH_Y * LAYERS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic  [NR-1:0]    local_in_valid,
  input  flit_t [NR-1:0]    local_in_flit,
  output logic  [NR-1:0]    local_in_stall,
  output logic  [NR-1:0]    local_out_valid,
  output flit_t [NR-1:0]    local_out_flit,
  input  logic  [NR-1:0]    local_out_stall
);

  // Per router, per port, both directions.
  logic  [NR-1:0][NPORTS-1:0] ivalid, istall, ovalid, ostall;
  flit_t [NR-1:0][NPORTS-1:0] iflit, oflit;

  function automatic int unsigned idx(int unsigned x, int unsigned y, int unsigned z);
    return z * MESH_X * MESH_Y + y * MESH_X + x;
  endfunction

  for (genvar z = 0; z < LAYERS; z++) begin : g_z
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      for (genvar x = 0; x < MESH_X; x++) begin : g_x
        localparam int unsigned R = z * MESH_X * MESH_Y + y * MESH_X + x;

        fredo_router #(
          .MY_X(x), .MY_Y(y), .MY_Z(z),
          .BUFFERED(BUFFERED), .BUF_DEPTH(BUF_DEPTH)
        ) u_router (
          .clk       (clk),
          .rst_n     (rst_n),
          .in_valid  (ivalid[R]),
          .in_flit   (iflit[R]),
          .in_stall  (istall[R]),
          .out_valid (ovalid[R]),
          .out_flit  (oflit[R]),
          .out_stall (ostall[R])
        );

        // Local port.
        assign ivalid[R][P_LOCAL]  = local_in_valid[R];
        assign iflit[R][P_LOCAL]   = local_in_flit[R];
        assign local_in_stall[R]   = istall[R][P_LOCAL];
        assign local_out_valid[R]  = ovalid[R][P_LOCAL];
        assign local_out_flit[R]   = oflit[R][P_LOCAL];
        assign ostall[R][P_LOCAL]  = local_out_stall[R];

        // Input side of every mesh port: what the neighbour sends towards us.
        // EAST input comes from the router at x+1 (its WEST output), etc.
        if (x + 1 < MESH_X) begin : g_e
          assign ivalid[R][P_EAST] = ovalid[idx(x+1, y, z)][P_WEST];
          assign iflit[R][P_EAST]  = oflit[idx(x+1, y, z)][P_WEST];
          assign ostall[R][P_EAST] = istall[idx(x+1, y, z)][P_WEST];
        end else begin : g_e_edge
          assign ivalid[R][P_EAST] = 1'b0;
          assign iflit[R][P_EAST]  = '0;
          assign ostall[R][P_EAST] = 1'b1;
        end
        if (x > 0) begin : g_w
          assign ivalid[R][P_WEST] = ovalid[idx(x-1, y, z)][P_EAST];
          assign iflit[R][P_WEST]  = oflit[idx(x-1, y, z)][P_EAST];
          assign ostall[R][P_WEST] = istall[idx(x-1, y, z)][P_EAST];
        end else begin : g_w_edge
          assign ivalid[R][P_WEST] = 1'b0;
          assign iflit[R][P_WEST]  = '0;
          assign ostall[R][P_WEST] = 1'b1;
        end
        if (y + 1 < MESH_Y) begin : g_n
          assign ivalid[R][P_NORTH] = ovalid[idx(x, y+1, z)][P_SOUTH];
          assign iflit[R][P_NORTH]  = oflit[idx(x, y+1, z)][P_SOUTH];
          assign ostall[R][P_NORTH] = istall[idx(x, y+1, z)][P_SOUTH];
        end else begin : g_n_edge
          assign ivalid[R][P_NORTH] = 1'b0;
          assign iflit[R][P_NORTH]  = '0;
          assign ostall[R][P_NORTH] = 1'b1;
        end
        if (y > 0) begin : g_s
          assign ivalid[R][P_SOUTH] = ovalid[idx(x, y-1, z)][P_NORTH];
          assign iflit[R][P_SOUTH]  = oflit[idx(x, y-1, z)][P_NORTH];
          assign ostall[R][P_SOUTH] = istall[idx(x, y-1, z)][P_NORTH];
        end else begin : g_s_edge
          assign ivalid[R][P_SOUTH] = 1'b0;
          assign iflit[R][P_SOUTH]  = '0;
          assign ostall[R][P_SOUTH] = 1'b1;
        end
        if (z + 1 < LAYERS) begin : g_t
          assign ivalid[R][P_TOP] = ovalid[idx(x, y, z+1)][P_BOTTOM];
          assign iflit[R][P_TOP]  = oflit[idx(x, y, z+1)][P_BOTTOM];
          assign ostall[R][P_TOP] = istall[idx(x, y, z+1)][P_BOTTOM];
        end else begin : g_t_edge
          assign ivalid[R][P_TOP] = 1'b0;
          assign iflit[R][P_TOP]  = '0;
          assign ostall[R][P_TOP] = 1'b1;
        end
        if (z > 0) begin : g_b
          assign ivalid[R][P_BOTTOM] = ovalid[idx(x, y, z-1)][P_TOP];
          assign iflit[R][P_BOTTOM]  = oflit[idx(x, y, z-1)][P_TOP];
          assign ostall[R][P_BOTTOM] = istall[idx(x, y, z-1)][P_TOP];
        end else begin : g_b_edge
          assign ivalid[R][P_BOTTOM] = 1'b0;
          assign iflit[R][P_BOTTOM]  = '0;
          assign ostall[R][P_BOTTOM] = 1'b1;
        end
      end
    end
  end

endmodule
