// copro_remap: the coprocessor address table of every processor.
//
// Each processor keeps the node address of the multiplier and of the divider
// it sends RV32M instructions to. Without faults these are the two nearby
// coprocessors of the chosen placement (FGC or FGC_MIX), each shared by two
// processors. Faults are injected before the program runs through the static
// mask `copro_fault`; for every failed coprocessor a spare is picked by the
// three published criteria: same type, fewest hops to the processors that
// lose their coprocessor, and not already used as the replacement of another
// failed one. Only the addresses change; the network is untouched.
//
// The search is a small sequential machine that runs once after reset (and
// again on `start`): it walks the nodes in increasing order and, for each
// failed coprocessor, scans all 32 nodes for the candidate with the smallest
// total hop count to the two processors that shared the failed one. A
// lower-numbered failure therefore gets the first pick, and ties go to the
// lower node number; both rules are this design's own, as the description
// only says the faults were chosen at random and lists the criteria. A failed
// coprocessor for which no candidate is left keeps its own address.
//
// Timing: NODES + 1 cycles plus NODES + 1 per failed coprocessor (under 300
// cycles for 8 faults); `ready` is high once the table is valid and stays
// high. `copro_fault` must be stable from reset (or `start`) on.
// Ports: copro_fault[n] marks node n as failed (ignored for processor nodes);
// mul_dest[p] and div_dest[p] are the addresses processor p uses.
module copro_remap
  import mpsoc_pkg::*;
#(
  parameter config_e CFG = CFG_FGC
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NODES-1:0] copro_fault,
  output logic             ready,
  output node_t            mul_dest [NPROC],
  output node_t            div_dest [NPROC]
);

  localparam int unsigned CW = $clog2(2 * (MESH_X + MESH_Y + MESH_Z)) + 1;

  typedef enum logic [1:0] {S_SCAN, S_SEARCH, S_COMMIT, S_DONE} state_e;

  state_e           state;
  node_t            f, c, best;
  logic [CW-1:0]    best_cost, cost;
  logic [NODES-1:0] used;
  node_t            repl [NODES];
  tile_e            kind [NODES];
  logic             cand_ok;

  for (genvar n = 0; n < NODES; n++) begin : g_kind
    assign kind[n] = tile_kind(CFG, n);
  end

  // Total hops from the two processors whose home coprocessor is f to c
  assign cost = CW'(hops(32'(c), sharer(CFG, 32'(f), 1'b0)) +
                     hops(32'(c), sharer(CFG, 32'(f), 1'b1)));
  assign cand_ok = (kind[c] == kind[f]) && !copro_fault[c] && !used[c] &&
                   (cost < best_cost);

  assign ready = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SCAN;
      f         <= '0;
      c         <= '0;
      best      <= '0;
      best_cost <= '1;
      used      <= '0;
      for (int n = 0; n < NODES; n++) repl[n] <= node_t'(n);
    end else if (start) begin
      state <= S_SCAN;
      f     <= '0;
      used  <= '0;
    end else begin
      unique case (state)
        S_SCAN: begin
          repl[f] <= f;
          if (copro_fault[f] && kind[f] != T_PROC) begin
            c         <= '0;
            best      <= f;
            best_cost <= '1;
            state     <= S_SEARCH;
          end else if (f == node_t'(NODES - 1)) begin
            state <= S_DONE;
          end else begin
            f <= f + node_t'(1);
          end
        end
        S_SEARCH: begin
          if (cand_ok) begin
            best      <= c;
            best_cost <= cost;
          end
          c <= c + node_t'(1);
          if (c == node_t'(NODES - 1)) state <= S_COMMIT;
        end
        S_COMMIT: begin
          repl[f] <= best;
          if (best != f) used[best] <= 1'b1;
          if (f == node_t'(NODES - 1)) state <= S_DONE;
          else begin
            f     <= f + node_t'(1);
            state <= S_SCAN;
          end
        end
        default: ;
      endcase
    end
  end

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    localparam int unsigned HOME_MUL = home_copro(CFG, proc_node(CFG, p), 1'b0);
    localparam int unsigned HOME_DIV = home_copro(CFG, proc_node(CFG, p), 1'b1);
    assign mul_dest[p] = repl[HOME_MUL];
    assign div_dest[p] = repl[HOME_DIV];
  end

endmodule
