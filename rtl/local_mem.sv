// local_mem: the local memory of a processor tile, holding its program and
// data.
//
// WORDS 32-bit words with two ports. The instruction port reads
// combinationally (the processor fetches, decodes and executes in one cycle).
// The data port also reads combinationally and writes on the clock edge with
// per-byte enables, which the RV32I byte and halfword stores need. Addresses
// are byte addresses; the low two bits are ignored and addresses wrap modulo
// the size. The memory has no reset: the program and data are written
// through the data port before the processor runs. The size is this design's
// own choice.
module local_mem
  import mpsoc_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic            clk,
  input  logic [XLEN-1:0] i_addr,
  output logic [XLEN-1:0] i_rdata,
  input  logic [XLEN-1:0] d_addr,
  input  logic            d_we,
  input  logic [3:0]      d_be,
  input  logic [XLEN-1:0] d_wdata,
  output logic [XLEN-1:0] d_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   iw, dw;

  assign iw      = i_addr[AW+1:2];
  assign dw      = d_addr[AW+1:2];
  assign i_rdata = mem[iw];
  assign d_rdata = mem[dw];

  always_ff @(posedge clk) begin
    if (d_we)
      for (int b = 0; b < 4; b++)
        if (d_be[b]) mem[dw][8*b +: 8] <= d_wdata[8*b +: 8];
  end

endmodule
