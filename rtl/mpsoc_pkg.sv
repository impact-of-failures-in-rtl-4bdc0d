// mpsoc_pkg: types, constants and placement functions shared by the
// 3D MPSoC in which RV32I processors reach shared RV32M coprocessors over a
// network-on-chip.
//
// Nodes are numbered id = z*16 + y*4 + x on the 4x4x2 mesh, so that the node
// number is the packed bit field {z, y, x}. That numbering reproduces every
// example pairing of the published placements (for instance processors 6 and
// 23 sharing multiplier 22 in FGC_MIX). A flit carries 32 data bits plus
// head and tail markers; the layout of the head flit is this design's own
// choice:
//   data[4:0]   destination node
//   data[9:5]   source node
//   data[12:10] RV32M funct3 (request packets only)
// A request packet is head, rs1 value, rs2 value (tail); a response packet is
// head, result (tail).
package mpsoc_pkg;

  localparam int unsigned MESH_X = 4;
  localparam int unsigned MESH_Y = 4;
  localparam int unsigned MESH_Z = 2;
  localparam int unsigned NODES  = MESH_X * MESH_Y * MESH_Z;
  localparam int unsigned NODE_W = $clog2(NODES);
  localparam int unsigned NPROC  = 16;
  localparam int unsigned XLEN   = 32;

  typedef logic [NODE_W-1:0] node_t;

  typedef struct packed {
    logic            head;
    logic            tail;
    logic [XLEN-1:0] data;
  } flit_t;

  // Router ports
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,   // x+1
    P_WEST  = 3'd2,   // x-1
    P_NORTH = 3'd3,   // y+1
    P_SOUTH = 3'd4,   // y-1
    P_UP    = 3'd5,   // z+1
    P_DOWN  = 3'd6    // z-1
  } port_e;
  localparam int unsigned NPORTS = 7;

  // Tile placements (Fig. 2 of the architecture description)
  typedef enum logic {
    CFG_FGC     = 1'b0,   // layer 0 processors, layer 1 coprocessors
    CFG_FGC_MIX = 1'b1    // checkerboard of processors and coprocessors
  } config_e;

  typedef enum logic [1:0] {
    T_PROC = 2'd0,
    T_MUL  = 2'd1,
    T_DIV  = 2'd2
  } tile_e;

  // RV32M funct3 codes
  localparam logic [2:0] F3_MUL    = 3'd0;
  localparam logic [2:0] F3_MULH   = 3'd1;
  localparam logic [2:0] F3_MULHSU = 3'd2;
  localparam logic [2:0] F3_MULHU  = 3'd3;
  localparam logic [2:0] F3_DIV    = 3'd4;
  localparam logic [2:0] F3_DIVU   = 3'd5;
  localparam logic [2:0] F3_REM    = 3'd6;
  localparam logic [2:0] F3_REMU   = 3'd7;

  function automatic int unsigned node_x(input int unsigned id);
    return id % MESH_X;
  endfunction
  function automatic int unsigned node_y(input int unsigned id);
    return (id / MESH_X) % MESH_Y;
  endfunction
  function automatic int unsigned node_z(input int unsigned id);
    return id / (MESH_X * MESH_Y);
  endfunction
  function automatic int unsigned node_id(input int unsigned x, input int unsigned y,
                                          input int unsigned z);
    return z * MESH_X * MESH_Y + y * MESH_X + x;
  endfunction

  function automatic int unsigned absdiff(input int unsigned a, input int unsigned b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Hop count between two nodes under XYZ routing (Manhattan distance)
  function automatic int unsigned hops(input int unsigned a, input int unsigned b);
    return absdiff(node_x(a), node_x(b)) + absdiff(node_y(a), node_y(b)) +
           absdiff(node_z(a), node_z(b));
  endfunction

  // What sits on a node in each placement
  function automatic tile_e tile_kind(input config_e cfg, input int unsigned id);
    if (cfg == CFG_FGC) begin
      if (node_z(id) == 0) return T_PROC;
      return (id % 2 == 0) ? T_MUL : T_DIV;
    end
    if (((node_x(id) + node_y(id)) % 2) == node_z(id)) return (node_z(id) == 0) ? T_DIV : T_MUL;
    return T_PROC;
  endfunction

  // Node of the p-th processor (processors are counted in node order)
  function automatic int unsigned proc_node(input config_e cfg, input int unsigned p);
    int unsigned n;
    n = 0;
    for (int unsigned id = 0; id < NODES; id++) begin
      if (tile_kind(cfg, id) == T_PROC) begin
        if (n == p) return id;
        n++;
      end
    end
    return 0;
  endfunction

  // Fault-free sharing: every coprocessor serves exactly two processors.
  // FGC: processors 2k and 2k+1 share multiplier 16+2k and divider 17+2k.
  // FGC_MIX: a layer-0 processor uses the multiplier right above it and the
  // divider beside it (x xor 1); a layer-1 processor uses the divider right
  // below it and the multiplier beside it.
  function automatic int unsigned home_copro(input config_e cfg, input int unsigned pnode,
                                             input logic is_div);
    int unsigned x, y, z;
    x = node_x(pnode); y = node_y(pnode); z = node_z(pnode);
    if (cfg == CFG_FGC) return node_id(x & ~32'd1, y, 1) + (is_div ? 1 : 0);
    if (z == 0) return is_div ? node_id(x ^ 1, y, 0) : node_id(x, y, 1);
    return is_div ? node_id(x, y, 0) : node_id(x ^ 1, y, 1);
  endfunction

  // The two processors that share coprocessor node c when nothing has failed
  // (which = 0 or 1); the inverse of home_copro.
  function automatic int unsigned sharer(input config_e cfg, input int unsigned c,
                                         input bit which);
    int unsigned x, y, z;
    x = node_x(c); y = node_y(c); z = node_z(c);
    if (cfg == CFG_FGC) return node_id(which ? (x | 1) : (x & ~32'd1), y, 0);
    if (z == 0) return which ? node_id(x ^ 1, y, 0) : node_id(x, y, 1);
    return which ? node_id(x ^ 1, y, 1) : node_id(x, y, 0);
  endfunction

endpackage
