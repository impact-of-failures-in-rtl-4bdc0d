// mul_copro: the multiplication coprocessor, executing the four RV32M
// multiply instructions MUL, MULH, MULHSU and MULHU.
//
// The operands are sign- or zero-extended to 33 bits according to funct3 and
// multiplied in one signed 33x33 product; MUL returns the low word, the other
// three the high word. The result is registered: `done` pulses and `result`
// is valid the clock after `start`. The architecture description gives the
// instruction set of the unit but not its structure; the one-cycle array
// multiplier is this design's own choice. A new `start` is accepted every
// cycle.
module mul_copro
  import mpsoc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2:0]      funct3,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            done,
  output logic [XLEN-1:0] result
);

  logic               a_signed, b_signed;
  logic signed [32:0] ax, bx;
  logic signed [65:0] prod;
  logic [XLEN-1:0]    res_d;

  always_comb begin
    a_signed = (funct3 == F3_MULH) || (funct3 == F3_MULHSU);
    b_signed = (funct3 == F3_MULH);
    ax       = {a_signed & a[XLEN-1], a};
    bx       = {b_signed & b[XLEN-1], b};
    prod     = ax * bx;
    res_d    = (funct3 == F3_MUL) ? prod[XLEN-1:0] : prod[2*XLEN-1:XLEN];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= start;
      if (start) result <= res_d;
    end
  end

endmodule
