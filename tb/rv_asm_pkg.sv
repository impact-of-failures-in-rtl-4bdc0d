// rv_asm_pkg: testbench helpers. Encoders for the RV32I/RV32M instructions
// the test programs use, so that programs can be built in SystemVerilog, and
// a reference model of the eight RV32M operations.
package rv_asm_pkg;

  function automatic logic [31:0] r_type(input logic [6:0] f7, input int rs2, input int rs1,
                                         input logic [2:0] f3, input int rd);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] mext(input logic [2:0] f3, input int rd, input int rs1,
                                       input int rs2);
    return r_type(7'b0000001, rs2, rs1, f3, rd);
  endfunction
  function automatic logic [31:0] add(input int rd, input int rs1, input int rs2);
    return r_type(7'b0, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] sub(input int rd, input int rs1, input int rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd);
  endfunction
  function automatic logic [31:0] i_type(input logic [6:0] op, input logic [2:0] f3,
                                         input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), f3, 5'(rd), op};
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return i_type(7'b0010011, 3'b000, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] slli(input int rd, input int rs1, input int sh);
    return i_type(7'b0010011, 3'b001, rd, rs1, sh);
  endfunction
  function automatic logic [31:0] srai(input int rd, input int rs1, input int sh);
    return i_type(7'b0010011, 3'b101, rd, rs1, 32'h400 | sh);
  endfunction
  function automatic logic [31:0] lw(input int rd, input int rs1, input int imm);
    return i_type(7'b0000011, 3'b010, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] lbu(input int rd, input int rs1, input int imm);
    return i_type(7'b0000011, 3'b100, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] sw(input int rs2, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b010, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] sb(input int rs2, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'b000, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] branch(input logic [2:0] f3, input int rs1, input int rs2,
                                         input int off);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] beq(input int rs1, input int rs2, input int off);
    return branch(3'b000, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] bne(input int rs1, input int rs2, input int off);
    return branch(3'b001, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] blt(input int rs1, input int rs2, input int off);
    return branch(3'b100, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] bge(input int rs1, input int rs2, input int off);
    return branch(3'b101, rs1, rs2, off);
  endfunction
  function automatic logic [31:0] jal(input int rd, input int off);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);
    return i_type(7'b1100111, 3'b000, rd, rs1, imm);
  endfunction
  function automatic logic [31:0] lui(input int rd, input int imm20);
    return {20'(imm20), 5'(rd), 7'b0110111};
  endfunction
  function automatic logic [31:0] auipc(input int rd, input int imm20);
    return {20'(imm20), 5'(rd), 7'b0010111};
  endfunction
  function automatic logic [31:0] ecall();
    return 32'h0000_0073;
  endfunction

  // Reference results of the RV32M instructions
  function automatic logic [31:0] ref_mext(input logic [2:0] f, input logic [31:0] x,
                                           input logic [31:0] y);
    longint sx, sy;
    logic [63:0] p;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    unique case (f)
      3'd0: return x * y;
      3'd1: begin p = 64'(sx * sy); return p[63:32]; end
      3'd2: begin p = 64'(sx * longint'({32'b0, y})); return p[63:32]; end
      3'd3: begin p = {32'b0, x} * {32'b0, y}; return p[63:32]; end
      3'd4: return (y == 0) ? 32'hFFFF_FFFF : 32'(sx / sy);
      3'd5: return (y == 0) ? 32'hFFFF_FFFF : x / y;
      3'd6: return (y == 0) ? x : 32'(sx % sy);
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

endpackage
