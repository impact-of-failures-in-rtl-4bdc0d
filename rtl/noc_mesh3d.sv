// noc_mesh3d: the 3D network-on-chip, a regular MESH_X x MESH_Y x MESH_Z mesh
// (4x4x2 by default) of seven-port noc_router instances.
//
// Router n sits at (x, y, z) with n = z*16 + y*4 + x and connects to its six
// neighbours where they exist; ports on the faces of the mesh are tied off
// (nothing arrives, and they are never `on`, which XYZ routing never needs).
// Only the local ports are brought out, one link per node: loc_in_* carries
// flits from the tile's network interface into the network, loc_out_* from
// the network to the interface. Both directions use the routers' on-off flow
// control.
module noc_mesh3d
  import mpsoc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4,
  parameter bit          RR_ARB    = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  loc_in_valid  [NODES],
  input  flit_t loc_in_flit   [NODES],
  output logic  loc_in_on     [NODES],
  output logic  loc_out_valid [NODES],
  output flit_t loc_out_flit  [NODES],
  input  logic  loc_out_on    [NODES]
);

  // Per-router, per-port link signals
  logic  r_in_valid  [NODES][NPORTS];
  flit_t r_in_flit   [NODES][NPORTS];
  logic  r_in_on     [NODES][NPORTS];
  logic  r_out_valid [NODES][NPORTS];
  flit_t r_out_flit  [NODES][NPORTS];
  logic  r_out_on    [NODES][NPORTS];

  // Neighbour of node n through port p, or -1 on a face of the mesh
  function automatic int neighbour(input int unsigned n, input int unsigned p);
    int x, y, z;
    x = int'(node_x(n)); y = int'(node_y(n)); z = int'(node_z(n));
    case (port_e'(p))
      P_EAST:  x++;
      P_WEST:  x--;
      P_NORTH: y++;
      P_SOUTH: y--;
      P_UP:    z++;
      P_DOWN:  z--;
      default: return -1;
    endcase
    if (x < 0 || y < 0 || z < 0 || x >= int'(MESH_X) || y >= int'(MESH_Y) || z >= int'(MESH_Z))
      return -1;
    return int'(node_id(x, y, z));
  endfunction

  // Port of the neighbour that faces port p
  function automatic int unsigned opposite(input int unsigned p);
    case (port_e'(p))
      P_EAST:  return int'(P_WEST);
      P_WEST:  return int'(P_EAST);
      P_NORTH: return int'(P_SOUTH);
      P_SOUTH: return int'(P_NORTH);
      P_UP:    return int'(P_DOWN);
      P_DOWN:  return int'(P_UP);
      default: return int'(P_LOCAL);
    endcase
  endfunction

  for (genvar n = 0; n < NODES; n++) begin : g_node
    noc_router #(
      .MY_X(node_x(n)), .MY_Y(node_y(n)), .MY_Z(node_z(n)),
      .BUF_DEPTH(BUF_DEPTH), .RR_ARB(RR_ARB)
    ) u_router (
      .clk, .rst_n,
      .in_valid (r_in_valid[n]),
      .in_flit  (r_in_flit[n]),
      .in_on    (r_in_on[n]),
      .out_valid(r_out_valid[n]),
      .out_flit (r_out_flit[n]),
      .out_on   (r_out_on[n])
    );

    assign r_in_valid[n][P_LOCAL] = loc_in_valid[n];
    assign r_in_flit[n][P_LOCAL]  = loc_in_flit[n];
    assign loc_in_on[n]           = r_in_on[n][P_LOCAL];
    assign loc_out_valid[n]       = r_out_valid[n][P_LOCAL];
    assign loc_out_flit[n]        = r_out_flit[n][P_LOCAL];
    assign r_out_on[n][P_LOCAL]   = loc_out_on[n];

    for (genvar p = 1; p < NPORTS; p++) begin : g_port
      localparam int NB = neighbour(n, p);
      if (NB >= 0) begin : g_link
        assign r_in_valid[n][p] = r_out_valid[NB][opposite(p)];
        assign r_in_flit[n][p]  = r_out_flit[NB][opposite(p)];
        assign r_out_on[n][p]   = r_in_on[NB][opposite(p)];
      end else begin : g_face
        assign r_in_valid[n][p] = 1'b0;
        assign r_in_flit[n][p]  = '0;
        assign r_out_on[n][p]   = 1'b0;
      end
    end
  end

endmodule
