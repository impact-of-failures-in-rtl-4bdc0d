// rr_arbiter: grants one of N requesters.
//
// With RR set, the search starts just after the last requester granted
// (round-robin): the pointer moves only when `update` is high, i.e. when
// the grant is used. With RR clear the lowest index wins (fixed priority).
// `grant` is one-hot or zero and combinational in `req`.
module rr_arbiter #(
  parameter int unsigned N  = 7,
  parameter bit          RR = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;

  always_comb begin
    int unsigned idx;
    grant = '0;
    for (int unsigned k = 0; k < N; k++) begin
      idx = RR ? ((int'(last) + 1 + k) % N) : k;
      if (req[idx] && grant == '0) grant[idx] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(N-1);
    end else if (update && grant != '0) begin
      for (int unsigned k = 0; k < N; k++)
        if (grant[k]) last <= IW'(k);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

endmodule
