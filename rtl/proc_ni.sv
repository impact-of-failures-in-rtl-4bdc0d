// proc_ni: the network interface of a processor tile.
//
// It turns an RV32M instruction raised by the core into a request packet and
// the answering packet back into a register value. The destination is the
// multiplier address `mul_dest` for funct3 0-3 and the divider address
// `div_dest` for funct3 4-7; these come from the processor's coprocessor
// address table and are the only thing that changes when a coprocessor fails.
// A request is three flits: head {funct3, source, destination}, rs1 value,
// rs2 value (tail). The response is two flits, head and result (tail); only
// the tail is used. One request is outstanding at a time, matching the core,
// which stalls until the result is back.
//
// `net_out_valid` is raised only while `net_out_on` is high, so a flit is
// never offered to a full buffer.
// Timing: the head flit leaves the cycle after `cop_req` rises, one flit per
// cycle while the router's input buffer is `on`; `cop_done` is a one-cycle
// pulse the cycle after the response tail arrives. The NI always accepts
// flits (`net_in_on` is high). The packing and the packet layout are this
// design's own; the description only says the NI packs and unpacks.
module proc_ni
  import mpsoc_pkg::*;
#(
  parameter int unsigned NODE = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  input  node_t           mul_dest,
  input  node_t           div_dest,
  // core side
  input  logic            cop_req,
  input  logic [2:0]      cop_funct3,
  input  logic [XLEN-1:0] cop_a,
  input  logic [XLEN-1:0] cop_b,
  output logic            cop_done,
  output logic [XLEN-1:0] cop_result,
  // to the router's local input
  output logic            net_out_valid,
  output flit_t           net_out_flit,
  input  logic            net_out_on,
  // from the router's local output
  input  logic            net_in_valid,
  input  flit_t           net_in_flit,
  output logic            net_in_on
);

  typedef enum logic [2:0] {S_IDLE, S_HEAD, S_OPA, S_OPB, S_WAIT, S_DONE} state_e;

  state_e          state;
  logic [2:0]      f3_q;
  logic [XLEN-1:0] a_q, b_q;
  node_t           dest_q;

  assign net_in_on = 1'b1;
  assign cop_done  = (state == S_DONE);

  always_comb begin
    net_out_valid = 1'b0;
    net_out_flit  = '0;
    unique case (state)
      S_HEAD: begin
        net_out_valid     = net_out_on;
        net_out_flit.head = 1'b1;
        net_out_flit.data = {19'b0, f3_q, node_t'(NODE), dest_q};
      end
      S_OPA: begin
        net_out_valid     = net_out_on;
        net_out_flit.data = a_q;
      end
      S_OPB: begin
        net_out_valid     = net_out_on;
        net_out_flit.tail = 1'b1;
        net_out_flit.data = b_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      f3_q       <= '0;
      a_q        <= '0;
      b_q        <= '0;
      dest_q     <= '0;
      cop_result <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cop_req) begin
          f3_q   <= cop_funct3;
          a_q    <= cop_a;
          b_q    <= cop_b;
          dest_q <= cop_funct3[2] ? div_dest : mul_dest;
          state  <= S_HEAD;
        end
        S_HEAD: if (net_out_on) state <= S_OPA;
        S_OPA:  if (net_out_on) state <= S_OPB;
        S_OPB:  if (net_out_on) state <= S_WAIT;
        S_WAIT: if (net_in_valid && net_in_flit.tail) begin
          cop_result <= net_in_flit.data;
          state      <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
