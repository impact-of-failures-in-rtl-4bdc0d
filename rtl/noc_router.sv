// noc_router: one router of the 3D mesh network-on-chip.
//
// Seven ports: the local tile and the six mesh neighbours (east/west on x,
// north/south on y, up/down on z). Every input port has a flit buffer
// (noc_fifo); there are no output buffers. Packets are routed XYZ
// (dimension order: first x, then y, then z) and switched wormhole: the head
// flit of a packet claims an output port, which then stays reserved for that
// input until the tail flit has passed. Each output has its own arbiter among
// the head flits that want it, round-robin by default or fixed priority
// (lowest port number first) when RR_ARB is 0. Link flow control is on-off:
// a router sends a flit only while the downstream buffer drives `on` high.
//
// Ports: in_valid/in_flit/in_on are the receiving side of each link (in_on
// goes upstream), out_valid/out_flit/out_on the sending side. A flit moves
// through the router in the cycle it reaches the head of its buffer if the
// output is free and `on`: one cycle per hop plus buffering.
// MY_X/MY_Y/MY_Z give the router's position. The routing, switching, flow
// control and arbitration follow the architecture description; the buffer
// depth and the one-cycle hop are this design's own.
module noc_router
  import mpsoc_pkg::*;
#(
  parameter int unsigned MY_X      = 0,
  parameter int unsigned MY_Y      = 0,
  parameter int unsigned MY_Z      = 0,
  parameter int unsigned BUF_DEPTH = 4,
  parameter bit          RR_ARB    = 1'b1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [NPORTS],
  input  flit_t in_flit   [NPORTS],
  output logic  in_on     [NPORTS],
  output logic  out_valid [NPORTS],
  output flit_t out_flit  [NPORTS],
  input  logic  out_on    [NPORTS]
);

  localparam int unsigned XW = $clog2(MESH_X);
  localparam int unsigned YW = $clog2(MESH_Y);

  logic              hv   [NPORTS];          // buffer head valid
  flit_t             hf   [NPORTS];          // buffer head flit
  logic              pop  [NPORTS];
  port_e             route[NPORTS];          // wanted output of each head
  port_e             cur_out [NPORTS];       // output held by a packet in flight
  logic [NPORTS-1:0] req  [NPORTS];          // req[o][i]: head flit of i wants o
  logic [NPORTS-1:0] gnt  [NPORTS];
  logic              busy [NPORTS];          // output reserved by a packet
  logic [2:0]        owner[NPORTS];
  logic              want [NPORTS];          // output has a flit to send
  logic              fire [NPORTS];          // output moves a flit this cycle
  logic [2:0]        sel  [NPORTS];

  // XYZ route of a destination address
  function automatic port_e xyz_route(input logic [XLEN-1:0] hdr);
    int unsigned dx, dy, dz;
    dx = int'(hdr[XW-1:0]);
    dy = int'(hdr[XW +: YW]);
    dz = int'(hdr[NODE_W-1 -: (NODE_W-XW-YW)]);
    if (dx > MY_X) return P_EAST;
    if (dx < MY_X) return P_WEST;
    if (dy > MY_Y) return P_NORTH;
    if (dy < MY_Y) return P_SOUTH;
    if (dz > MY_Z) return P_UP;
    if (dz < MY_Z) return P_DOWN;
    return P_LOCAL;
  endfunction

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    noc_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push      (in_valid[i]),
      .push_flit (in_flit[i]),
      .on        (in_on[i]),
      .head_valid(hv[i]),
      .head_flit (hf[i]),
      .pop       (pop[i])
    );
    assign route[i] = hf[i].head ? xyz_route(hf[i].data) : cur_out[i];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) cur_out[i] <= P_LOCAL;
      else if (pop[i] && hf[i].head) cur_out[i] <= route[i];
    end
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = hv[i] && hf[i].head && (route[i] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS), .RR(RR_ARB)) u_arb (
      .clk, .rst_n,
      .req   (busy[o] ? '0 : req[o]),
      .update(fire[o]),
      .grant (gnt[o])
    );

    always_comb begin
      sel[o] = owner[o];
      if (!busy[o])
        for (int i = 0; i < NPORTS; i++)
          if (gnt[o][i]) sel[o] = 3'(i);
    end

    assign want[o]      = busy[o] ? (hv[owner[o]] && !hf[owner[o]].head)
                                  : (gnt[o] != '0);
    assign out_flit[o]  = hf[sel[o]];
    assign fire[o]      = want[o] && out_on[o];
    assign out_valid[o] = fire[o];    // a flit is sent only while `on`

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        busy[o]  <= 1'b0;
        owner[o] <= '0;
      end else if (fire[o]) begin
        if (out_flit[o].tail) busy[o] <= 1'b0;
        else if (out_flit[o].head) begin
          busy[o]  <= 1'b1;
          owner[o] <= sel[o];
        end
      end
    end
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) pop[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++)
      if (fire[o]) pop[sel[o]] = 1'b1;
  end

endmodule
