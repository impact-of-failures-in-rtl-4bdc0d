// tb_rv32i_core: runs a directed RV32IM program on the single-cycle core with
// a testbench memory and a testbench coprocessor that answers RV32M requests
// after a random delay. Checks the stored results of arithmetic, shifts,
// upper immediates, byte store/load, branches, jumps and a loop against
// values worked out by hand, checks that the core holds its PC and does not
// write back while stalled, and checks the rate: every instruction takes one
// clock, so the cycle count is the instruction count plus the stall cycles.
module tb_rv32i_core;
  import mpsoc_pkg::*;
  import rv_asm_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] i_addr, i_rdata, d_addr, d_wdata, d_rdata;
  logic        d_we;
  logic [3:0]  d_be;
  logic        cop_req, cop_done = 0;
  logic [2:0]  cop_funct3;
  logic [31:0] cop_a, cop_b, cop_result = '0;
  logic        halted;
  logic [31:0] cycles;

  logic [31:0] mem [1024];
  int checks = 0, failures = 0;
  int n_stall = 0, n_req = 0;

  rv32i_core dut (
    .clk, .rst_n, .i_addr, .i_rdata, .d_addr, .d_we, .d_be, .d_wdata, .d_rdata,
    .cop_req, .cop_funct3, .cop_a, .cop_b, .cop_done, .cop_result, .halted, .cycles
  );

  assign i_rdata = mem[i_addr[11:2]];
  assign d_rdata = mem[d_addr[11:2]];
  always @(posedge clk)
    if (d_we) for (int b = 0; b < 4; b++) if (d_be[b]) mem[d_addr[11:2]][8*b +: 8] <= d_wdata[8*b +: 8];

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coprocessor model: answers after 1..20 clocks; the PC must hold meanwhile
  initial begin
    forever begin
      @(negedge clk);
      if (cop_req && rst_n) begin
        int d;
        logic [31:0] pc0;
        d = $urandom_range(1, 20);
        pc0 = i_addr;
        n_req++;
        repeat (d) begin
          @(negedge clk);
          n_stall++;
          checks++;
          if (i_addr != pc0 || !cop_req) begin
            failures++;
            $display("FAIL core moved while stalled");
          end
        end
        cop_result = ref_mext(cop_funct3, cop_a, cop_b);
        cop_done = 1;
        @(negedge clk);
        cop_done = 0;
      end
    end
  end

  logic [31:0] prog [$];
  int ninstr;

  task automatic expect_word(input logic [31:0] addr, input logic [31:0] exp, input string what);
    checks++;
    if (mem[addr[11:2]] !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, mem[addr[11:2]], exp);
    end
  endtask

  initial begin
    int auipc_pc;
    prog.push_back(addi(1, 0, 100));
    prog.push_back(addi(2, 0, -7));
    prog.push_back(add(3, 1, 2));          prog.push_back(sw(3, 0, 'h200));
    prog.push_back(sub(4, 1, 2));          prog.push_back(sw(4, 0, 'h204));
    prog.push_back(slli(5, 2, 3));         prog.push_back(sw(5, 0, 'h208));
    prog.push_back(srai(6, 2, 1));         prog.push_back(sw(6, 0, 'h20c));
    prog.push_back(lui(7, 'h12345));       prog.push_back(sw(7, 0, 'h210));
    auipc_pc = prog.size() * 4;
    prog.push_back(auipc(8, 1));           prog.push_back(sw(8, 0, 'h214));
    prog.push_back(sb(2, 0, 'h218));
    prog.push_back(lbu(9, 0, 'h218));      prog.push_back(sw(9, 0, 'h21c));
    prog.push_back(mext(3'd0, 10, 1, 2));  prog.push_back(sw(10, 0, 'h220));
    prog.push_back(mext(3'd4, 11, 1, 2));  prog.push_back(sw(11, 0, 'h224));
    prog.push_back(mext(3'd6, 12, 1, 2));  prog.push_back(sw(12, 0, 'h228));
    prog.push_back(addi(13, 0, 0));
    prog.push_back(blt(2, 1, 8));          // taken
    prog.push_back(addi(13, 0, 1));        // skipped
    prog.push_back(bge(2, 1, 8));          // not taken
    prog.push_back(addi(14, 0, 5));
    prog.push_back(sw(13, 0, 'h22c));
    prog.push_back(sw(14, 0, 'h230));
    prog.push_back(jal(15, 8));
    prog.push_back(addi(16, 0, 9));        // skipped
    prog.push_back(sw(15, 0, 'h234));
    prog.push_back(addi(17, 0, 0));
    prog.push_back(addi(18, 0, 10));
    prog.push_back(addi(17, 17, 1));       // loop: 10 times
    prog.push_back(bne(17, 18, -4));
    prog.push_back(sw(17, 0, 'h238));
    prog.push_back(ecall());
    foreach (mem[i]) mem[i] = '0;
    foreach (prog[i]) mem[i] = prog[i];
    // executed instructions: straight line, less two skipped, plus 9 extra loop passes
    ninstr = prog.size() - 2 + 9 * 2;

    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!halted) @(negedge clk);
    repeat (2) @(negedge clk);

    expect_word('h200, 32'd93, "add");
    expect_word('h204, 32'd107, "sub");
    expect_word('h208, -32'd56, "slli");
    expect_word('h20c, -32'd4, "srai");
    expect_word('h210, 32'h1234_5000, "lui");
    expect_word('h214, 32'(auipc_pc) + 32'h1000, "auipc");
    expect_word('h21c, 32'h0000_00f9, "sb/lbu");
    expect_word('h220, -32'd700, "mul");
    expect_word('h224, -32'd14, "div");
    expect_word('h228, 32'd2, "rem");
    expect_word('h22c, 32'd0, "blt taken");
    expect_word('h230, 32'd5, "bge not taken");
    expect_word('h234, 32'(4 * (prog.size() - 8)), "jal link");
    expect_word('h238, 32'd10, "loop");
    checks++;
    if (n_req != 3) begin failures++; $display("FAIL %0d coprocessor requests", n_req); end
    // one clock per instruction (ECALL included) plus the stall clocks
    checks++;
    if (int'(cycles) != ninstr + n_stall) begin
      failures++;
      $display("FAIL cycles %0d exp %0d (+%0d stall)", cycles, ninstr, n_stall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
