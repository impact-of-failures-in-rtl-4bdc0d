// copro_tile: a coprocessor tile of the MPSoC, a network interface and either
// the multiplication unit (KIND = T_MUL) or the division unit (KIND = T_DIV).
// `fault` marks the coprocessor as failed (see copro_ni). The tile answers
// any processor that sends to its node address.
module copro_tile
  import mpsoc_pkg::*;
#(
  parameter int unsigned NODE = 16,
  parameter tile_e       KIND = T_MUL
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fault,
  output logic  net_out_valid,
  output flit_t net_out_flit,
  input  logic  net_out_on,
  input  logic  net_in_valid,
  input  flit_t net_in_flit,
  output logic  net_in_on
);

  logic            start, done;
  logic [2:0]      funct3;
  logic [XLEN-1:0] a, b, result;

  copro_ni #(.NODE(NODE)) u_ni (
    .clk, .rst_n, .fault,
    .unit_start(start), .unit_funct3(funct3), .unit_a(a), .unit_b(b),
    .unit_done(done), .unit_result(result),
    .net_out_valid, .net_out_flit, .net_out_on,
    .net_in_valid, .net_in_flit, .net_in_on
  );

  if (KIND == T_DIV) begin : g_div
    logic busy;
    div_copro u_div (
      .clk, .rst_n, .start, .funct3, .a, .b, .busy, .done, .result
    );
  end else begin : g_mul
    mul_copro u_mul (
      .clk, .rst_n, .start, .funct3, .a, .b, .done, .result
    );
  end

endmodule
