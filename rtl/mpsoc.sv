// mpsoc: the complete 3D MPSoC in which sixteen RV32I processors share eight
// multiplication and eight division coprocessors to execute the RV32M
// extension, over a 4x4x2 mesh network-on-chip.
//
// Every one of the 32 nodes is a tile: a router of noc_mesh3d plus either a
// processor tile (core, local memory, NI) or a coprocessor tile (NI plus
// multiplier or divider). CFG selects the placement:
//   CFG_FGC      layer 0 holds the 16 processors, layer 1 the coprocessors
//                (multipliers on even nodes, dividers on odd nodes);
//                processors 2k and 2k+1 share the multiplier and divider
//                right above them.
//   CFG_FGC_MIX  checkerboard: layer 0 holds processors and dividers, layer 1
//                processors and multipliers, so every processor has both of
//                its coprocessors one hop away.
// Without faults each coprocessor serves two processors. `copro_fault`, set
// from reset on, marks failed coprocessors; after reset copro_remap points
// the affected processors at replacement coprocessors (`remap_ready` rises
// when done, under 300 cycles), and the failed ones stop
// answering. Processors do not start before `remap_ready`.
//
// Use: hold `run` low, load each processor's program and data with host_we /
// host_proc / host_addr / host_wdata (host_rdata reads back the selected
// word), raise `run`, and wait until every bit of `halted` is set; `cycles`
// then gives each processor's execution time in clocks. Processor p sits on
// node proc_node(CFG, p) of the mesh.
module mpsoc
  import mpsoc_pkg::*;
#(
  parameter config_e     CFG       = CFG_FGC,
  parameter int unsigned MEM_WORDS = 4096,
  parameter int unsigned BUF_DEPTH = 4,
  parameter bit          RR_ARB    = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     run,
  input  logic [NODES-1:0]         copro_fault,
  input  logic                     host_we,
  input  logic [$clog2(NPROC)-1:0] host_proc,
  input  logic [XLEN-1:0]          host_addr,
  input  logic [XLEN-1:0]          host_wdata,
  output logic [XLEN-1:0]          host_rdata,
  output logic                     remap_ready,
  output logic [NPROC-1:0]         halted,
  output logic [XLEN-1:0]          cycles [NPROC]
);

  logic  ni_out_valid [NODES];
  flit_t ni_out_flit  [NODES];
  logic  ni_out_on    [NODES];
  logic  ni_in_valid  [NODES];
  flit_t ni_in_flit   [NODES];
  logic  ni_in_on     [NODES];

  node_t           mul_dest   [NPROC];
  node_t           div_dest   [NPROC];
  logic [XLEN-1:0] rdata      [NPROC];

  noc_mesh3d #(.BUF_DEPTH(BUF_DEPTH), .RR_ARB(RR_ARB)) u_noc (
    .clk, .rst_n,
    .loc_in_valid (ni_out_valid),
    .loc_in_flit  (ni_out_flit),
    .loc_in_on    (ni_out_on),
    .loc_out_valid(ni_in_valid),
    .loc_out_flit (ni_in_flit),
    .loc_out_on   (ni_in_on)
  );

  logic proc_run;

  copro_remap #(.CFG(CFG)) u_remap (
    .clk, .rst_n, .start(1'b0), .copro_fault, .ready(remap_ready), .mul_dest, .div_dest
  );

  // processors start only once the coprocessor address table is valid
  assign proc_run = run && remap_ready;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    localparam int unsigned N = proc_node(CFG, p);
    proc_tile #(.NODE(N), .MEM_WORDS(MEM_WORDS)) u_tile (
      .clk, .rst_n, .run(proc_run),
      .mul_dest(mul_dest[p]), .div_dest(div_dest[p]),
      .host_we(host_we && (host_proc == p)), .host_addr, .host_wdata,
      .host_rdata(rdata[p]),
      .net_out_valid(ni_out_valid[N]), .net_out_flit(ni_out_flit[N]),
      .net_out_on(ni_out_on[N]),
      .net_in_valid(ni_in_valid[N]), .net_in_flit(ni_in_flit[N]),
      .net_in_on(ni_in_on[N]),
      .halted(halted[p]), .cycles(cycles[p])
    );
  end

  assign host_rdata = rdata[host_proc];

  for (genvar n = 0; n < NODES; n++) begin : g_node
    if (tile_kind(CFG, n) != T_PROC) begin : g_copro
      copro_tile #(.NODE(n), .KIND(tile_kind(CFG, n))) u_tile (
        .clk, .rst_n, .fault(copro_fault[n]),
        .net_out_valid(ni_out_valid[n]), .net_out_flit(ni_out_flit[n]),
        .net_out_on(ni_out_on[n]),
        .net_in_valid(ni_in_valid[n]), .net_in_flit(ni_in_flit[n]),
        .net_in_on(ni_in_on[n])
      );
    end
  end

endmodule
