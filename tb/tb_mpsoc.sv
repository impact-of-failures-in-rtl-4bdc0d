// tb_mpsoc: end-to-end test of the MPSoC at its default parameters (FGC
// placement, 4x4x2 mesh, 16 processors, 16 coprocessors).
//
// Every processor runs the same RV32IM program on its own operand pairs: for
// each pair it executes all eight RV32M instructions (MUL, MULH, MULHSU,
// MULHU, DIV, DIVU, REM, REMU) and stores the results, then halts with ECALL.
// The results are compared with a reference model. The program runs twice:
// with no fault, and with eight failed coprocessors (four multipliers, four
// dividers). In the faulty run no failed coprocessor may receive a request,
// some coprocessor must serve more than two processors (a replacement), no
// processor may run faster than without faults, and every processor must
// finish.
//
// Mechanisms counted, each of which must occur: core stalls on a coprocessor
// instruction, on-off back-pressure on a link, two head flits competing for
// one output, a head flit waiting behind a wormhole reservation, requests to
// a replacement coprocessor, and division by zero.
module tb_mpsoc;
  import mpsoc_pkg::*;
  import rv_asm_pkg::*;

  localparam int PAIRS = 6;
  localparam logic [31:0] IN_BASE  = 32'h1000;
  localparam logic [31:0] OUT_BASE = 32'h2000;

  logic            clk = 0, rst_n = 0, run = 0;
  logic [NODES-1:0] copro_fault = '0;
  logic            host_we = 0;
  logic [3:0]      host_proc = '0;
  logic [31:0]     host_addr = '0, host_wdata = '0;
  logic [31:0]     host_rdata;
  logic            remap_ready;
  logic [NPROC-1:0] halted;
  logic [31:0]     cycles [NPROC];

  int checks = 0, failures = 0;

  mpsoc dut (
    .clk, .rst_n, .run, .copro_fault,
    .host_we, .host_proc, .host_addr, .host_wdata, .host_rdata,
    .remap_ready, .halted, .cycles
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_stall, n_backpressure, n_contention, n_wormhole_wait, n_div0;
  logic [NPROC-1:0] served_by [NODES];
  int heads_at [NODES];
  bit counting;

  for (genvar p = 0; p < NPROC; p++) begin : g_pc
    always @(posedge clk) if (counting) begin
      if (dut.g_proc[p].u_tile.u_core.stall) n_stall++;
    end
  end
  for (genvar n = 0; n < NODES; n++) begin : g_nc
    for (genvar o = 0; o < NPORTS; o++) begin : g_oc
      always @(posedge clk) if (counting) begin
        if (dut.u_noc.g_node[n].u_router.want[o] && !dut.u_noc.g_node[n].u_router.out_on[o])
          n_backpressure++;
        if (!dut.u_noc.g_node[n].u_router.busy[o] &&
            $countones(dut.u_noc.g_node[n].u_router.req[o]) > 1)
          n_contention++;
        if (dut.u_noc.g_node[n].u_router.busy[o] && dut.u_noc.g_node[n].u_router.req[o] != '0)
          n_wormhole_wait++;
      end
    end
    // request heads delivered to node n, and by which processor
    always @(posedge clk) if (counting) begin
      if (dut.u_noc.loc_out_valid[n] && dut.u_noc.loc_out_on[n] &&
          dut.u_noc.loc_out_flit[n].head && tile_kind(CFG_FGC, n) != T_PROC) begin
        heads_at[n]++;
        for (int p = 0; p < NPROC; p++)
          if (int'(dut.u_noc.loc_out_flit[n].data[2*NODE_W-1:NODE_W]) == int'(proc_node(CFG_FGC, p)))
            served_by[n][p] = 1'b1;
      end
    end
  end

  // ---------------- program and data ----------------
  logic [31:0] prog [$];
  logic [31:0] opa [NPROC][PAIRS], opb [NPROC][PAIRS];

  task automatic build_program();
    int loop_at, beq_at;
    prog.delete();
    prog.push_back(lui(1, 1));                 // x1 = 0x1000
    prog.push_back(lw(3, 1, 0));               // x3 = pair count
    prog.push_back(addi(1, 1, 16));            // x1 = first pair
    prog.push_back(lui(2, 2));                 // x2 = 0x2000 results
    loop_at = prog.size();
    prog.push_back(32'h0);                     // beq x3, x0, end (patched)
    beq_at = loop_at;
    prog.push_back(lw(4, 1, 0));
    prog.push_back(lw(5, 1, 4));
    for (int f = 0; f < 8; f++) begin
      prog.push_back(mext(3'(f), 6, 4, 5));
      prog.push_back(sw(6, 2, 4 * f));
    end
    prog.push_back(addi(1, 1, 8));
    prog.push_back(addi(2, 2, 32));
    prog.push_back(addi(3, 3, -1));
    prog.push_back(jal(0, (loop_at - prog.size()) * 4));
    prog[beq_at] = beq(3, 0, (prog.size() - beq_at) * 4);
    prog.push_back(ecall());
  endtask

  task automatic host_write(input int p, input logic [31:0] addr, input logic [31:0] data);
    @(negedge clk);
    host_we = 1; host_proc = 4'(p); host_addr = addr; host_wdata = data;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic host_read(input int p, input logic [31:0] addr, output logic [31:0] data);
    @(negedge clk);
    host_proc = 4'(p); host_addr = addr;
    #1 data = host_rdata;
  endtask

  task automatic load_all();
    for (int p = 0; p < NPROC; p++) begin
      foreach (prog[i]) host_write(p, 32'(4 * i), prog[i]);
      host_write(p, IN_BASE, PAIRS);
      for (int k = 0; k < PAIRS; k++) begin
        host_write(p, IN_BASE + 16 + 8 * k, opa[p][k]);
        host_write(p, IN_BASE + 20 + 8 * k, opb[p][k]);
      end
    end
  endtask

  task automatic run_once(input logic [NODES-1:0] faults, output int max_cycles,
                          output int pc_cycles [NPROC]);
    int t;
    run = 0;
    copro_fault = faults;
    rst_n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_all();
    while (!remap_ready) @(negedge clk);
    foreach (served_by[n]) begin served_by[n] = '0; heads_at[n] = 0; end
    counting = 1;
    run = 1;
    t = 0;
    while (halted != '1 && t < 100000) begin
      @(negedge clk);
      t++;
    end
    counting = 0;
    run = 0;                      // memories back to the host port
    checks++;
    if (halted != '1) begin
      failures++;
      $display("FAIL not all processors halted: %b", halted);
    end
    max_cycles = 0;
    for (int p = 0; p < NPROC; p++) begin
      pc_cycles[p] = int'(cycles[p]);
      if (int'(cycles[p]) > max_cycles) max_cycles = int'(cycles[p]);
    end
    // results
    for (int p = 0; p < NPROC; p++)
      for (int k = 0; k < PAIRS; k++)
        for (int f = 0; f < 8; f++) begin
          logic [31:0] got, exp;
          host_read(p, OUT_BASE + 32 * k + 4 * f, got);
          exp = ref_mext(3'(f), opa[p][k], opb[p][k]);
          checks++;
          if (got !== exp) begin
            failures++;
            $display("FAIL proc %0d pair %0d f3 %0d: got %h exp %h", p, k, f, got, exp);
          end
        end
  endtask

  initial begin
    int c0, c8;
    int pc0 [NPROC], pc8 [NPROC];
    logic [NODES-1:0] f8;
    bit replaced;
    build_program();
    for (int p = 0; p < NPROC; p++)
      for (int k = 0; k < PAIRS; k++) begin
        opa[p][k] = $urandom;
        opb[p][k] = (k == 1) ? 32'h0 : (k == 2) ? (32'($urandom) >> 20) : $urandom;
        if (k == 1) n_div0 += 4;  // the four divide instructions of this pair
      end

    run_once('0, c0, pc0);
    $display("no fault: %0d cycles", c0);

    // eight failures, half multipliers (even nodes 16..30), half dividers
    f8 = '0;
    f8[16] = 1; f8[20] = 1; f8[26] = 1; f8[30] = 1;
    f8[19] = 1; f8[21] = 1; f8[27] = 1; f8[29] = 1;
    run_once(f8, c8, pc8);
    $display("8 faults: %0d cycles", c8);

    replaced = 0;
    for (int n = 0; n < NODES; n++) begin
      if (f8[n]) begin
        checks++;
        if (heads_at[n] != 0) begin
          failures++;
          $display("FAIL failed coprocessor %0d received %0d requests", n, heads_at[n]);
        end
      end
      if ($countones(served_by[n]) > 2) replaced = 1;
      checks++;
      if ($countones(served_by[n]) > 4) begin
        failures++;
        $display("FAIL coprocessor %0d serves %0d processors", n, $countones(served_by[n]));
      end
    end
    checks++;
    if (c8 < c0) begin
      failures++;
      $display("FAIL faults made the program faster (%0d < %0d)", c8, c0);
    end

    $display("stalls=%0d backpressure=%0d contention=%0d wormhole_wait=%0d div0=%0d replaced=%0d",
             n_stall, n_backpressure, n_contention, n_wormhole_wait, n_div0, replaced);
    checks += 6;
    if (n_stall == 0)         begin failures++; $display("FAIL no stall");        end
    if (n_backpressure == 0)  begin failures++; $display("FAIL no back-pressure"); end
    if (n_contention == 0)    begin failures++; $display("FAIL no contention");   end
    if (n_wormhole_wait == 0) begin failures++; $display("FAIL no wormhole wait"); end
    if (n_div0 == 0)          begin failures++; $display("FAIL no division by zero"); end
    if (!replaced)            begin failures++; $display("FAIL no replacement used"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
