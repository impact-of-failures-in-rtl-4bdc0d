// rv32i_core: a single-cycle RV32I processor whose RV32M instructions are
// executed by an external, shared coprocessor.
//
// Every instruction is fetched, decoded and executed in one clock from the
// tile's local memory (combinational reads, clocked register and memory
// writes). The base integer set RV32I is executed in the datapath. An
// instruction of the M extension (opcode OP with funct7 = 0000001) is not:
// the core raises `cop_req` with funct3 and the two source values, and stalls
// (PC and register file hold) until `cop_done` returns the result, which is
// written to rd in that same cycle. The request stays asserted, unchanged,
// for the whole stall. This lets programs compiled for RV32IM run on an RV32I
// datapath, as the architecture intends.
//
// ECALL and EBREAK stop the core (`halted`), which is how a program signals
// that it has finished; FENCE executes as a no-op. CSRs, interrupts and
// misaligned accesses are not supported. `cycles` counts clocks from reset
// until the halt, giving each processor's execution time. Reset starts
// execution at RESET_PC. The halt convention and the cycle counter are this
// design's own.
module rv32i_core
  import mpsoc_pkg::*;
#(
  parameter logic [XLEN-1:0] RESET_PC = '0
) (
  input  logic            clk,
  input  logic            rst_n,
  // instruction port
  output logic [XLEN-1:0] i_addr,
  input  logic [XLEN-1:0] i_rdata,
  // data port
  output logic [XLEN-1:0] d_addr,
  output logic            d_we,
  output logic [3:0]      d_be,
  output logic [XLEN-1:0] d_wdata,
  input  logic [XLEN-1:0] d_rdata,
  // coprocessor port
  output logic            cop_req,
  output logic [2:0]      cop_funct3,
  output logic [XLEN-1:0] cop_a,
  output logic [XLEN-1:0] cop_b,
  input  logic            cop_done,
  input  logic [XLEN-1:0] cop_result,
  // status
  output logic            halted,
  output logic [XLEN-1:0] cycles
);

  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_OP     = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  logic [XLEN-1:0] pc, pc_next;
  logic [XLEN-1:0] rf [32];

  logic [31:0]     ins;
  logic [6:0]      opcode;
  logic [4:0]      rd, rs1, rs2;
  logic [2:0]      f3;
  logic [6:0]      f7;
  logic [XLEN-1:0] rv1, rv2;
  logic [XLEN-1:0] imm_i, imm_s, imm_b, imm_u, imm_j;
  logic [XLEN-1:0] alu_b, alu_y, wb_val, ld_val;
  logic            wb_en, is_mext, stall, take_branch;
  logic [4:0]      shamt;

  assign ins    = i_rdata;
  assign i_addr = pc;
  assign opcode = ins[6:0];
  assign rd     = ins[11:7];
  assign f3     = ins[14:12];
  assign rs1    = ins[19:15];
  assign rs2    = ins[24:20];
  assign f7     = ins[31:25];

  assign rv1 = (rs1 == 5'd0) ? '0 : rf[rs1];
  assign rv2 = (rs2 == 5'd0) ? '0 : rf[rs2];

  assign imm_i = {{20{ins[31]}}, ins[31:20]};
  assign imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
  assign imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
  assign imm_u = {ins[31:12], 12'b0};
  assign imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};

  // M-extension instructions go to the coprocessor
  assign is_mext    = !halted && (opcode == OP_OP) && (f7 == 7'b0000001);
  assign cop_req    = is_mext;
  assign cop_funct3 = f3;
  assign cop_a      = rv1;
  assign cop_b      = rv2;
  assign stall      = is_mext && !cop_done;

  // Integer ALU (OP and OP-IMM)
  assign alu_b = (opcode == OP_OP) ? rv2 : imm_i;
  assign shamt = alu_b[4:0];
  always_comb begin
    unique case (f3)
      3'b000: alu_y = (opcode == OP_OP && f7[5]) ? rv1 - alu_b : rv1 + alu_b;
      3'b001: alu_y = rv1 << shamt;
      3'b010: alu_y = XLEN'($signed(rv1) < $signed(alu_b));
      3'b011: alu_y = XLEN'(rv1 < alu_b);
      3'b100: alu_y = rv1 ^ alu_b;
      3'b101: alu_y = f7[5] ? XLEN'($signed(rv1) >>> shamt) : rv1 >> shamt;
      3'b110: alu_y = rv1 | alu_b;
      default: alu_y = rv1 & alu_b;
    endcase
  end

  always_comb begin
    unique case (f3)
      3'b000: take_branch = (rv1 == rv2);
      3'b001: take_branch = (rv1 != rv2);
      3'b100: take_branch = ($signed(rv1) < $signed(rv2));
      3'b101: take_branch = ($signed(rv1) >= $signed(rv2));
      3'b110: take_branch = (rv1 < rv2);
      3'b111: take_branch = (rv1 >= rv2);
      default: take_branch = 1'b0;
    endcase
  end

  // Load/store
  logic [1:0]      boff;
  logic [XLEN-1:0] ld_word;
  assign d_addr  = rv1 + ((opcode == OP_STORE) ? imm_s : imm_i);
  assign boff    = d_addr[1:0];
  assign d_we    = !halted && (opcode == OP_STORE);
  assign ld_word = d_rdata >> (8 * boff);
  always_comb begin
    unique case (f3[1:0])
      2'b00:   begin d_be = 4'b0001 << boff; d_wdata = {4{rv2[7:0]}};  end
      2'b01:   begin d_be = 4'b0011 << boff; d_wdata = {2{rv2[15:0]}}; end
      default: begin d_be = 4'b1111;         d_wdata = rv2;            end
    endcase
    unique case (f3)
      3'b000:  ld_val = {{24{ld_word[7]}}, ld_word[7:0]};
      3'b001:  ld_val = {{16{ld_word[15]}}, ld_word[15:0]};
      3'b100:  ld_val = {24'b0, ld_word[7:0]};
      3'b101:  ld_val = {16'b0, ld_word[15:0]};
      default: ld_val = d_rdata;
    endcase
  end

  // Write-back and next PC
  always_comb begin
    wb_en   = 1'b0;
    wb_val  = alu_y;
    pc_next = pc + 32'd4;
    unique case (opcode)
      OP_LUI:    begin wb_en = 1'b1; wb_val = imm_u; end
      OP_AUIPC:  begin wb_en = 1'b1; wb_val = pc + imm_u; end
      OP_JAL:    begin wb_en = 1'b1; wb_val = pc + 32'd4; pc_next = pc + imm_j; end
      OP_JALR:   begin wb_en = 1'b1; wb_val = pc + 32'd4; pc_next = (rv1 + imm_i) & ~32'd1; end
      OP_BRANCH: if (take_branch) pc_next = pc + imm_b;
      OP_LOAD:   begin wb_en = 1'b1; wb_val = ld_val; end
      OP_IMM:    wb_en = 1'b1;
      OP_OP:     begin wb_en = 1'b1; if (is_mext) wb_val = cop_result; end
      default:   ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc     <= RESET_PC;
      halted <= 1'b0;
      cycles <= '0;
    end else if (!halted) begin
      cycles <= cycles + 32'd1;
      if (opcode == OP_SYSTEM) halted <= 1'b1;
      else if (!stall) pc <= pc_next;
    end
  end

  always_ff @(posedge clk) begin
    if (!halted && !stall && wb_en && rd != 5'd0) rf[rd] <= wb_val;
  end

endmodule
