// copro_ni: the network interface of a coprocessor tile.
//
// It unpacks a three-flit request packet (head {funct3, source,
// destination}, operand a, operand b), starts the attached arithmetic unit,
// waits for its `done`, and sends a two-flit response (head addressed to the
// requesting processor, then the result as tail). It serves one request at a
// time: while a request is being computed or answered it holds `net_in_on`
// low, so further requests wait in the network. Because it serves whoever
// sends, a coprocessor can be shared by any number of processors.
//
// `fault` models a failed coprocessor, set before the program runs: the NI
// still drains whatever arrives but never starts the unit and never answers.
// The architecture description says only that a failed coprocessor's work
// goes to a replacement; silent failure is this design's reading of it.
//
// `net_out_valid` is raised only while `net_out_on` is high, so a flit is
// never offered to a full buffer.
// Timing: one flit per cycle in; `unit_start` pulses the cycle after the tail;
// the head of the response leaves the cycle after `unit_done`.
module copro_ni
  import mpsoc_pkg::*;
#(
  parameter int unsigned NODE = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            fault,
  // arithmetic unit
  output logic            unit_start,
  output logic [2:0]      unit_funct3,
  output logic [XLEN-1:0] unit_a,
  output logic [XLEN-1:0] unit_b,
  input  logic            unit_done,
  input  logic [XLEN-1:0] unit_result,
  // to the router's local input
  output logic            net_out_valid,
  output flit_t           net_out_flit,
  input  logic            net_out_on,
  // from the router's local output
  input  logic            net_in_valid,
  input  flit_t           net_in_flit,
  output logic            net_in_on
);

  typedef enum logic [2:0] {S_RXH, S_RXA, S_RXB, S_START, S_EXEC, S_TXH, S_TXR} state_e;

  state_e          state;
  node_t           src_q;
  logic [XLEN-1:0] res_q;

  assign net_in_on  = fault || (state == S_RXH) || (state == S_RXA) || (state == S_RXB);
  assign unit_start = (state == S_START);

  always_comb begin
    net_out_valid = 1'b0;
    net_out_flit  = '0;
    if (state == S_TXH) begin
      net_out_valid     = net_out_on;
      net_out_flit.head = 1'b1;
      net_out_flit.data = {22'b0, node_t'(NODE), src_q};
    end else if (state == S_TXR) begin
      net_out_valid     = net_out_on;
      net_out_flit.tail = 1'b1;
      net_out_flit.data = res_q;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_RXH;
      src_q       <= '0;
      unit_funct3 <= '0;
      unit_a      <= '0;
      unit_b      <= '0;
      res_q       <= '0;
    end else if (fault) begin
      state <= S_RXH;
    end else begin
      unique case (state)
        S_RXH: if (net_in_valid && net_in_flit.head) begin
          src_q       <= net_in_flit.data[2*NODE_W-1:NODE_W];
          unit_funct3 <= net_in_flit.data[2*NODE_W +: 3];
          state       <= S_RXA;
        end
        S_RXA: if (net_in_valid) begin
          unit_a <= net_in_flit.data;
          state  <= S_RXB;
        end
        S_RXB: if (net_in_valid) begin
          unit_b <= net_in_flit.data;
          state  <= net_in_flit.tail ? S_START : S_RXH;
        end
        S_START: state <= S_EXEC;
        S_EXEC: if (unit_done) begin
          res_q <= unit_result;
          state <= S_TXH;
        end
        S_TXH: if (net_out_on) state <= S_TXR;
        S_TXR: if (net_out_on) state <= S_RXH;
        default: state <= S_RXH;
      endcase
    end
  end

endmodule
