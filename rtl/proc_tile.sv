// proc_tile: a processor tile of the MPSoC, made of the single-cycle RV32I
// core, its local memory and its network interface.
//
// While `run` is low the core is held at its reset PC and the memory's data
// port belongs to the host port (host_*), through which the program and data
// are loaded and results read back (combinational read, clocked write of a
// whole word). When `run` goes high the core starts at address 0; RV32M
// instructions go through the NI to the coprocessors at `mul_dest` and
// `div_dest`. The host port and the `run` control are this design's own way
// of loading and starting the tiles.
module proc_tile
  import mpsoc_pkg::*;
#(
  parameter int unsigned NODE      = 0,
  parameter int unsigned MEM_WORDS = 4096
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run,
  input  node_t           mul_dest,
  input  node_t           div_dest,
  // host access to the local memory while not running
  input  logic            host_we,
  input  logic [XLEN-1:0] host_addr,
  input  logic [XLEN-1:0] host_wdata,
  output logic [XLEN-1:0] host_rdata,
  // network
  output logic            net_out_valid,
  output flit_t           net_out_flit,
  input  logic            net_out_on,
  input  logic            net_in_valid,
  input  flit_t           net_in_flit,
  output logic            net_in_on,
  // status
  output logic            halted,
  output logic [XLEN-1:0] cycles
);

  logic [XLEN-1:0] i_addr, i_rdata;
  logic [XLEN-1:0] c_addr, c_wdata, m_addr, m_wdata, d_rdata;
  logic [3:0]      c_be, m_be;
  logic            c_we, m_we;
  logic            cop_req, cop_done;
  logic [2:0]      cop_funct3;
  logic [XLEN-1:0] cop_a, cop_b, cop_result;
  logic            core_rst_n;

  assign core_rst_n = rst_n && run;

  rv32i_core u_core (
    .clk, .rst_n(core_rst_n),
    .i_addr, .i_rdata,
    .d_addr(c_addr), .d_we(c_we), .d_be(c_be), .d_wdata(c_wdata), .d_rdata,
    .cop_req, .cop_funct3, .cop_a, .cop_b, .cop_done, .cop_result,
    .halted, .cycles
  );

  assign m_addr     = run ? c_addr  : host_addr;
  assign m_we       = run ? c_we    : host_we;
  assign m_be       = run ? c_be    : 4'b1111;
  assign m_wdata    = run ? c_wdata : host_wdata;
  assign host_rdata = d_rdata;

  local_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk,
    .i_addr, .i_rdata,
    .d_addr(m_addr), .d_we(m_we), .d_be(m_be), .d_wdata(m_wdata), .d_rdata
  );

  proc_ni #(.NODE(NODE)) u_ni (
    .clk, .rst_n(core_rst_n),
    .mul_dest, .div_dest,
    .cop_req, .cop_funct3, .cop_a, .cop_b, .cop_done, .cop_result,
    .net_out_valid, .net_out_flit, .net_out_on,
    .net_in_valid, .net_in_flit, .net_in_on
  );

endmodule
