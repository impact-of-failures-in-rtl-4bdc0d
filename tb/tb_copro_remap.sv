// tb_copro_remap: checks the coprocessor address tables of both placements.
// Fault-free: every processor reaches a multiplier and a divider, each
// coprocessor serves exactly two processors, and the published example
// pairings hold (FGC: processors 0,1 -> 16,17 and 6,7 -> 22,23; FGC_MIX:
// nodes 1 and 16 share 0 and 17, nodes 6 and 23 share multiplier 22, nodes 12
// and 29 share divider 13). With faults: the published FGC_MIX example
// (multiplier 22 fails and is replaced by 19, one hop from node 23 and three
// from node 6), and for random fault sets the three replacement criteria
// (same type, not failed, not used twice, minimal hop sum) against a
// reference search written here.
module tb_copro_remap;
  import mpsoc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic ready_a, ready_b;
  logic [NODES-1:0] fault_a = '0, fault_b = '0;
  node_t md_a [NPROC], dd_a [NPROC], md_b [NPROC], dd_b [NPROC];
  int checks = 0, failures = 0;
  // loop bounds held in variables so that the simulator keeps the loops rolled
  int nn = 32, np = 16;

  copro_remap #(.CFG(CFG_FGC)) dut_a (
    .clk, .rst_n, .start, .copro_fault(fault_a), .ready(ready_a), .mul_dest(md_a), .div_dest(dd_a));
  copro_remap #(.CFG(CFG_FGC_MIX)) dut_b (
    .clk, .rst_n, .start, .copro_fault(fault_b), .ready(ready_b), .mul_dest(md_b), .div_dest(dd_b));

  always #5 clk = ~clk;

  // restart both searches and wait for the tables; checks the search time
  // nfault: faults of the new mask; the other instance may still hold 8
  task automatic research(input int nfault);
    int nmax;
    int t;
    nmax = (nfault > 8) ? nfault : 8;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t = 0;
    while (!(ready_a && ready_b)) begin
      @(negedge clk);
      t++;
    end
    checks++;
    if (t > NODES + 1 + nmax * (NODES + 1)) begin
      failures++;
      $display("FAIL search took %0d cycles", t);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Placement worked out independently: node = z*16 + y*4 + x
  function automatic int hop(int a, int b);
    int d;
    d = 0;
    d += (a % 4 > b % 4) ? a % 4 - b % 4 : b % 4 - a % 4;
    d += ((a / 4) % 4 > (b / 4) % 4) ? (a / 4) % 4 - (b / 4) % 4 : (b / 4) % 4 - (a / 4) % 4;
    d += (a / 16 > b / 16) ? a / 16 - b / 16 : b / 16 - a / 16;
    return d;
  endfunction
  function automatic int kind(bit mix, int n);   // 0 proc, 1 mul, 2 div
    int par;
    par = ((n % 4) + ((n / 4) % 4)) % 2;
    if (!mix) return (n < 16) ? 0 : ((n % 2 == 0) ? 1 : 2);
    if (n < 16) return par ? 0 : 2;
    return par ? 1 : 0;
  endfunction
  function automatic int pnode(bit mix, int p);
    int c;
    c = 0;
    for (int n = 0; n < nn; n++) if (kind(mix, n) == 0) begin
      if (c == p) return n;
      c++;
    end
    return -1;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Reference greedy search over a home map
  task automatic verify(input bit mix, input logic [NODES-1:0] f, input node_t md [NPROC],
                        input node_t dd [NPROC], input int hm [NPROC], input int hd [NPROC]);
    int repl [32];
    bit used [32];
    foreach (used[i]) used[i] = 0;
    for (int c = 0; c < nn; c++) begin
      int best, bc, cost;
      repl[c] = c;
      if (!f[c] || kind(mix, c) == 0) continue;
      best = c; bc = 1 << 30;
      for (int k = 0; k < nn; k++) begin
        if (kind(mix, k) != kind(mix, c) || f[k] || used[k]) continue;
        cost = 0;
        for (int p = 0; p < np; p++)
          if (hm[p] == c || hd[p] == c) cost += hop(k, pnode(mix, p));
        if (cost < bc) begin bc = cost; best = k; end
      end
      repl[c] = best;
      if (best != c) used[best] = 1;
    end
    for (int p = 0; p < np; p++) begin
      check(int'(md[p]) == repl[hm[p]], $sformatf("mix=%0d p=%0d mul %0d exp %0d", mix, p, md[p], repl[hm[p]]));
      check(int'(dd[p]) == repl[hd[p]], $sformatf("mix=%0d p=%0d div %0d exp %0d", mix, p, dd[p], repl[hd[p]]));
    end
  endtask

  int hm_a [NPROC], hd_a [NPROC], hm_b [NPROC], hd_b [NPROC];

  initial begin
    int use_cnt [32];
    repeat (2) @(negedge clk);
    rst_n = 1;
    research(0);
    // fault-free tables
    foreach (use_cnt[i]) use_cnt[i] = 0;
    for (int p = 0; p < np; p++) begin
      hm_a[p] = md_a[p]; hd_a[p] = dd_a[p]; hm_b[p] = md_b[p]; hd_b[p] = dd_b[p];
      check(kind(0, md_a[p]) == 1 && kind(0, dd_a[p]) == 2, "FGC types");
      check(kind(1, md_b[p]) == 1 && kind(1, dd_b[p]) == 2, "FGC_MIX types");
      check(hop(int'(md_b[p]), pnode(1, p)) == 1 && hop(int'(dd_b[p]), pnode(1, p)) == 1,
            $sformatf("FGC_MIX one hop p=%0d", p));
      use_cnt[md_a[p]]++; use_cnt[dd_a[p]]++;
    end
    for (int n = np; n < nn; n++) check(use_cnt[n] == 2, $sformatf("FGC share count node %0d", n));
    check(md_a[0] == 16 && dd_a[0] == 17 && md_a[1] == 16 && dd_a[1] == 17, "FGC 0,1 -> 16,17");
    check(md_a[6] == 22 && dd_a[6] == 23 && md_a[7] == 22 && dd_a[7] == 23, "FGC 6,7 -> 22,23");
    for (int p = 0; p < np; p++) begin
      int n;
      n = pnode(1, p);
      if (n == 1 || n == 16) check(dd_b[p] == 0 && md_b[p] == 17, "FGC_MIX 1,16 -> 0,17");
      if (n == 6 || n == 23) check(md_b[p] == 22, "FGC_MIX 6,23 -> mul 22");
      if (n == 12 || n == 29) check(dd_b[p] == 13, "FGC_MIX 12,29 -> div 13");
    end

    // published example: multiplier 22 fails in FGC_MIX, replacement 19
    fault_b[22] = 1'b1;
    research(1);
    for (int p = 0; p < np; p++) begin
      int n;
      n = pnode(1, p);
      if (n == 6)  check(md_b[p] == 19 && hop(19, 6) == 3, "node 6 -> 19, 3 hops");
      if (n == 23) check(md_b[p] == 19 && hop(19, 23) == 1, "node 23 -> 19, 1 hop");
    end
    // FGC: best case two hops from one affected processor, three from the other
    fault_a[16] = 1'b1;
    research(1);
    check((hop(int'(md_a[0]), 0) == 3 && hop(int'(md_a[1]), 1) == 2) ||
          (hop(int'(md_a[0]), 0) == 2 && hop(int'(md_a[1]), 1) == 3), "FGC 2/3-hop replacement");

    // random fault sets of 2, 6 and 8 coprocessors, half of each type
    for (int t = 0; t < 60; t++) begin
      int nf;
      nf = (t % 3 == 0) ? 2 : (t % 3 == 1) ? 6 : 8;
      for (int mix = 0; mix < 2; mix++) begin
        logic [NODES-1:0] f;
        int nm, nd;
        f = '0; nm = 0; nd = 0;
        while (nm + nd < nf) begin
          int c;
          c = $urandom_range(0, 31);
          if (f[c]) continue;
          if (kind(mix[0], c) == 1 && nm < nf / 2) begin f[c] = 1; nm++; end
          if (kind(mix[0], c) == 2 && nd < nf / 2) begin f[c] = 1; nd++; end
        end
        if (mix == 0) begin fault_a = f; research(nf); verify(0, f, md_a, dd_a, hm_a, hd_a); end
        else          begin fault_b = f; research(nf); verify(1, f, md_b, dd_b, hm_b, hd_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
