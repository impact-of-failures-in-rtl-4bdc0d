// tb_workloads: runs the two image-processing kernels the architecture was
// evaluated with, Contrast and Conv (Sobel), on all sixteen processors of
// both placements, FGC and FGC_MIX, with 0, 2, 6 and 8 failed coprocessors
// (half multipliers, half dividers). Each non-zero count is drawn three
// times at random (fault models A, B and C): ten scenarios per kernel.
//
// Each processor owns a slice of the image. Contrast stretches every pixel:
// out = (p - lo) * 255 / (hi - lo), one MUL and one DIVU per pixel. Conv
// applies the 3x3 Sobel masks: gx and gy are sums of nine MULs each, and
// out = |gx| + |gy|; it has no division. The programs are RV32IM code
// assembled here. Every result is compared with a model computed in the
// testbench, every processor must halt, and a run with faults may not be
// faster than the fault-free run of the same placement. The clock counts of
// the slowest processor are printed in the form of the study's execution
// time table (cycles and increase over the fault-free run).
module tb_workloads;
  import mpsoc_pkg::*;
  import rv_asm_pkg::*;

  localparam int NPIX = 24;                       // Contrast: pixels per processor
  localparam int CW = 8, CR = 3;                  // Conv: image width, output rows per processor
  localparam logic [31:0] HDR = 32'h1000, IMG = 32'h1100, OUT = 32'h2000;
  localparam logic [31:0] KX = 32'h1040, KY = 32'h1080;

  logic             clk = 0, rst_n = 0, run = 0;
  logic [NODES-1:0] fault [2];
  logic             host_we = 0;
  logic [3:0]       host_proc = '0;
  logic [31:0]      host_addr = '0, host_wdata = '0;
  logic [31:0]      host_rdata [2];
  logic             ready [2];
  logic [NPROC-1:0] halted [2];
  logic [31:0]      cycles [2][NPROC];
  int checks = 0, failures = 0;

  mpsoc #(.CFG(CFG_FGC)) dut_fgc (
    .clk, .rst_n, .run, .copro_fault(fault[0]), .host_we, .host_proc, .host_addr, .host_wdata,
    .host_rdata(host_rdata[0]), .remap_ready(ready[0]), .halted(halted[0]), .cycles(cycles[0]));
  mpsoc #(.CFG(CFG_FGC_MIX)) dut_mix (
    .clk, .rst_n, .run, .copro_fault(fault[1]), .host_we, .host_proc, .host_addr, .host_wdata,
    .host_rdata(host_rdata[1]), .remap_ready(ready[1]), .halted(halted[1]), .cycles(cycles[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  int          img [NPROC][64];
  int          lo, hi;
  int          sx [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  int          sy [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};

  task automatic contrast_program();
    int loop_at;
    prog.delete();
    prog.push_back(lui(1, 1));           // x1 = header
    prog.push_back(lw(3, 1, 0));         // pixel count
    prog.push_back(lw(4, 1, 4));         // lo
    prog.push_back(lw(5, 1, 8));         // hi - lo
    prog.push_back(addi(6, 0, 255));
    prog.push_back(addi(1, 1, 256));     // x1 = image
    prog.push_back(lui(2, 2));           // x2 = output
    loop_at = prog.size();
    prog.push_back(32'h0);
    prog.push_back(lw(7, 1, 0));
    prog.push_back(sub(7, 7, 4));
    prog.push_back(mext(3'd0, 7, 7, 6));  // mul
    prog.push_back(mext(3'd5, 7, 7, 5));  // divu
    prog.push_back(sw(7, 2, 0));
    prog.push_back(addi(1, 1, 4));
    prog.push_back(addi(2, 2, 4));
    prog.push_back(addi(3, 3, -1));
    prog.push_back(jal(0, (loop_at - prog.size()) * 4));
    prog[loop_at] = beq(3, 0, (prog.size() - loop_at) * 4);
    prog.push_back(ecall());
  endtask

  task automatic conv_program();
    int row_at, col_at, brow, bcol;
    prog.delete();
    prog.push_back(lui(1, 1));
    prog.push_back(addi(1, 1, 256));     // x1 = row base of the image
    prog.push_back(lui(2, 2));           // x2 = output
    prog.push_back(lui(8, 1));
    prog.push_back(addi(9, 8, 'h80));    // x9 = ky
    prog.push_back(addi(8, 8, 'h40));    // x8 = kx
    prog.push_back(addi(20, 0, CR));     // rows left
    row_at = prog.size();
    prog.push_back(32'h0);               // beq x20, x0, end
    prog.push_back(addi(21, 0, CW - 2)); // columns left
    prog.push_back(addi(22, 1, 0));      // x22 = window base
    col_at = prog.size();
    prog.push_back(32'h0);               // beq x21, x0, next row
    prog.push_back(addi(10, 0, 0));      // gx
    prog.push_back(addi(11, 0, 0));      // gy
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        prog.push_back(lw(12, 22, 4 * (i * CW + j)));
        prog.push_back(lw(13, 8, 4 * (3 * i + j)));
        prog.push_back(mext(3'd0, 14, 12, 13));
        prog.push_back(add(10, 10, 14));
        prog.push_back(lw(13, 9, 4 * (3 * i + j)));
        prog.push_back(mext(3'd0, 14, 12, 13));
        prog.push_back(add(11, 11, 14));
      end
    prog.push_back(bge(10, 0, 8));
    prog.push_back(sub(10, 0, 10));
    prog.push_back(bge(11, 0, 8));
    prog.push_back(sub(11, 0, 11));
    prog.push_back(add(10, 10, 11));
    prog.push_back(sw(10, 2, 0));
    prog.push_back(addi(2, 2, 4));
    prog.push_back(addi(22, 22, 4));
    prog.push_back(addi(21, 21, -1));
    prog.push_back(jal(0, (col_at - prog.size()) * 4));
    bcol = prog.size();
    prog[col_at] = beq(21, 0, (bcol - col_at) * 4);
    prog.push_back(addi(1, 1, 4 * CW));
    prog.push_back(addi(20, 20, -1));
    prog.push_back(jal(0, (row_at - prog.size()) * 4));
    brow = prog.size();
    prog[row_at] = beq(20, 0, (brow - row_at) * 4);
    prog.push_back(ecall());
  endtask

  task automatic wr(input int p, input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    host_we = 1; host_proc = 4'(p); host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic int conv_ref(input int p, input int r, input int c);
    int gx, gy;
    gx = 0; gy = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        gx += sx[3 * i + j] * img[p][(r + i) * CW + c + j];
        gy += sy[3 * i + j] * img[p][(r + i) * CW + c + j];
      end
    return ((gx < 0) ? -gx : gx) + ((gy < 0) ? -gy : gy);
  endfunction

  // one run of one kernel on both placements; returns the slowest processor
  task automatic run_kernel(input bit conv, input logic [NODES-1:0] f0, input logic [NODES-1:0] f1,
                            output int worst [2]);
    int t;
    run = 0;
    fault[0] = f0; fault[1] = f1;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPROC; p++) begin
      foreach (prog[i]) wr(p, 32'(4 * i), prog[i]);
      if (!conv) begin
        wr(p, HDR, NPIX); wr(p, HDR + 4, lo); wr(p, HDR + 8, hi - lo);
        for (int k = 0; k < NPIX; k++) wr(p, IMG + 4 * k, img[p][k]);
      end else begin
        for (int k = 0; k < 9; k++) begin wr(p, KX + 4 * k, sx[k]); wr(p, KY + 4 * k, sy[k]); end
        for (int k = 0; k < (CR + 2) * CW; k++) wr(p, IMG + 4 * k, img[p][k]);
      end
    end
    while (!(ready[0] && ready[1])) @(negedge clk);
    run = 1;
    t = 0;
    while ((halted[0] != '1 || halted[1] != '1) && t < 200000) begin
      @(negedge clk);
      t++;
    end
    run = 0;
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (halted[d] != '1) begin failures++; $display("FAIL placement %0d did not finish", d); end
      worst[d] = 0;
      for (int p = 0; p < NPROC; p++) if (int'(cycles[d][p]) > worst[d]) worst[d] = int'(cycles[d][p]);
    end
    // results
    for (int p = 0; p < NPROC; p++) begin
      int nout;
      nout = conv ? CR * (CW - 2) : NPIX;
      for (int k = 0; k < nout; k++) begin
        int exp;
        exp = conv ? conv_ref(p, k / (CW - 2), k % (CW - 2))
                   : ((img[p][k] - lo) * 255) / (hi - lo);
        @(negedge clk);
        host_proc = 4'(p); host_addr = OUT + 32'(4 * k);
        #1;
        for (int d = 0; d < 2; d++) begin
          checks++;
          if (host_rdata[d] !== 32'(exp)) begin
            failures++;
            $display("FAIL %s placement %0d proc %0d out %0d: %0d exp %0d",
                     conv ? "conv" : "contrast", d, p, k, host_rdata[d], exp);
          end
        end
      end
    end
  endtask

  function automatic logic [NODES-1:0] pick_faults(input bit mix, input int n);
    logic [NODES-1:0] f;
    int nm, nd;
    f = '0; nm = 0; nd = 0;
    while (nm + nd < n) begin
      int c;
      c = $urandom_range(0, NODES - 1);
      if (!f[c] && tile_kind(mix ? CFG_FGC_MIX : CFG_FGC, c) == T_MUL && nm < n / 2) begin f[c] = 1; nm++; end
      if (!f[c] && tile_kind(mix ? CFG_FGC_MIX : CFG_FGC, c) == T_DIV && nd < n / 2) begin f[c] = 1; nd++; end
    end
    return f;
  endfunction

  initial begin
    int nf [4] = '{0, 2, 6, 8};
    int base [2], worst [2];
    // image: pixels 20..220, so lo/hi below are the global extremes
    lo = 20; hi = 220;
    for (int p = 0; p < NPROC; p++)
      for (int k = 0; k < 64; k++) img[p][k] = $urandom_range(lo, hi);
    img[0][0] = lo; img[1][1] = hi;
    repeat (2) @(negedge clk);
    for (int app = 0; app < 2; app++) begin
      if (app == 0) contrast_program(); else conv_program();
      if (app == 0) $display("Contrast:"); else $display("Conv:");
      for (int s = 0; s < 4; s++)
        for (int m = 0; m < ((s == 0) ? 1 : 3); m++) begin   // fault models A, B, C
          run_kernel(app[0], pick_faults(0, nf[s]), pick_faults(1, nf[s]), worst);
          if (s == 0) base = worst;
          for (int d = 0; d < 2; d++) begin
            checks++;
            if (worst[d] < base[d]) begin
              failures++;
              $display("FAIL %0dF run faster than the fault-free run", nf[s]);
            end
          end
          $display("  %0dF %s  FGC %6d cycles (+%0d%%)   FGC_MIX %6d cycles (+%0d%%)", nf[s],
                   (s == 0) ? "-" : (m == 0) ? "A" : (m == 1) ? "B" : "C",
                   worst[0], (worst[0] - base[0]) * 100 / base[0],
                   worst[1], (worst[1] - base[1]) * 100 / base[1]);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
