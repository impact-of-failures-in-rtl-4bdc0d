// div_copro: the division coprocessor, executing the four RV32M divide
// instructions DIV, DIVU, REM and REMU.
//
// A radix-2 restoring divider works on the magnitudes of the operands, one
// quotient bit per clock, and fixes the signs at the end. Division by zero and
// the signed overflow case (-2^31 / -1) give the results the RISC-V
// specification defines (quotient all ones or -2^31, remainder the dividend
// or zero) without iterating. The architecture description names the
// instructions only; the iterative structure is this design's own choice.
//
// Timing: `start` is taken while `busy` is low; `done` pulses with `result`
// valid 34 clocks later (one load cycle, 32 iterations, one sign fix-up),
// or 1 clock later for the special cases.
module div_copro
  import mpsoc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [2:0]      funct3,
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  output logic            busy,
  output logic            done,
  output logic [XLEN-1:0] result
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIX} state_e;

  state_e          state;
  logic [5:0]      count;
  logic [XLEN-1:0] quo, rem, divisor;
  logic            neg_q, neg_r, want_rem;

  logic            is_signed;
  logic [XLEN:0]   trial;
  logic [XLEN-1:0] rem_shift;

  assign is_signed = ~funct3[0];
  assign busy      = (state != S_IDLE);

  always_comb begin
    rem_shift = {rem[XLEN-2:0], quo[XLEN-1]};
    trial     = {1'b0, rem_shift} - {1'b0, divisor};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      count    <= '0;
      quo      <= '0;
      rem      <= '0;
      divisor  <= '0;
      neg_q    <= 1'b0;
      neg_r    <= 1'b0;
      want_rem <= 1'b0;
      done     <= 1'b0;
      result   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          want_rem <= funct3[1];
          if (b == '0) begin
            // divide by zero: quotient all ones, remainder the dividend
            result <= funct3[1] ? a : '1;
            done   <= 1'b1;
          end else if (is_signed && a == {1'b1, {(XLEN-1){1'b0}}} && b == '1) begin
            // signed overflow
            result <= funct3[1] ? '0 : a;
            done   <= 1'b1;
          end else begin
            quo     <= (is_signed && a[XLEN-1]) ? -a : a;
            divisor <= (is_signed && b[XLEN-1]) ? -b : b;
            rem     <= '0;
            neg_q   <= is_signed && (a[XLEN-1] ^ b[XLEN-1]);
            neg_r   <= is_signed && a[XLEN-1];
            count   <= 6'(XLEN);
            state   <= S_RUN;
          end
        end
        S_RUN: begin
          if (!trial[XLEN]) begin
            rem <= trial[XLEN-1:0];
            quo <= {quo[XLEN-2:0], 1'b1};
          end else begin
            rem <= rem_shift;
            quo <= {quo[XLEN-2:0], 1'b0};
          end
          count <= count - 6'd1;
          if (count == 6'd1) state <= S_FIX;
        end
        S_FIX: begin
          if (want_rem) result <= neg_r ? -rem : rem;
          else          result <= neg_q ? -quo : quo;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
