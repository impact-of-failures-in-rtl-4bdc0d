// tb_mul_copro: checks the multiplication coprocessor against 64-bit
// reference products for MUL, MULH, MULHSU and MULHU, on corner operands and
// random ones, and checks that the result arrives exactly one clock after
// `start`.
module tb_mul_copro;
  import mpsoc_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            start = 0;
  logic [2:0]      funct3 = '0;
  logic [31:0]     a = '0, b = '0;
  logic            done;
  logic [31:0]     result;
  int              checks = 0, failures = 0;

  mul_copro dut (.clk, .rst_n, .start, .funct3, .a, .b, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mul(input logic [2:0] f, input logic [31:0] x,
                                          input logic [31:0] y);
    logic [63:0] p;
    unique case (f)
      3'd0: p = 64'(x) * 64'(y);
      3'd1: p = 64'(longint'($signed(x)) * longint'($signed(y)));
      3'd2: p = 64'(longint'($signed(x)) * longint'({32'b0, y}));
      default: p = {32'b0, x} * {32'b0, y};
    endcase
    return (f == 3'd0) ? p[31:0] : p[63:32];
  endfunction

  task automatic one(input logic [2:0] f, input logic [31:0] x, input logic [31:0] y);
    @(negedge clk);
    funct3 = f; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!done || result !== ref_mul(f, x, y)) begin
      failures++;
      $display("FAIL f3=%0d a=%h b=%h got %h (done=%b) exp %h", f, x, y, result, done,
               ref_mul(f, x, y));
    end
  endtask

  logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++)
      foreach (corner[i]) foreach (corner[j]) one(3'(f), corner[i], corner[j]);
    for (int k = 0; k < 2000; k++) one(3'($urandom_range(0, 3)), $urandom, $urandom);
    // done is a single pulse
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL done not a pulse"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
