// noc_fifo: the input buffer of one router port.
//
// A circular buffer of DEPTH flits with a registered occupancy count. The
// `on` output is the on-off flow-control signal sent upstream: it is high
// while the buffer has a free slot, and it is computed from registers only, so
// the upstream router may send in the same cycle it sees `on`. The head flit
// is shown combinationally on `head_flit` while `head_valid` is high; `pop`
// removes it. A push and a pop in the same clock are allowed.
module noc_fifo
  import mpsoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t push_flit,
  output logic  on,
  output logic  head_valid,
  output flit_t head_flit,
  input  logic  pop
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t             mem [DEPTH];
  logic [PW-1:0]     rd_ptr, wr_ptr;
  logic [PW:0]       count;
  logic              do_push, do_pop;

  assign on         = (count < (PW+1)'(DEPTH));
  assign head_valid = (count != '0);
  assign head_flit  = mem[rd_ptr];
  assign do_push    = push && on;
  assign do_pop     = pop && head_valid;

  function automatic logic [PW-1:0] incr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_flit;
  end

  // A flow-controlled sender never pushes into a full buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> on)
    else $error("noc_fifo: push while off");

endmodule
