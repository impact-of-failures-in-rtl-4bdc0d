// tb_div_copro: checks the division coprocessor against reference results
// for DIV, DIVU, REM and REMU, including division by zero and the signed
// overflow case, and checks the latency: 34 clocks from `start` to `done`
// for a normal division, 1 clock for the two special cases.
module tb_div_copro;
  import mpsoc_pkg::*;

  logic            clk = 0, rst_n = 0;
  logic            start = 0;
  logic [2:0]      funct3 = '0;
  logic [31:0]     a = '0, b = '0;
  logic            busy, done;
  logic [31:0]     result;
  int              checks = 0, failures = 0;

  div_copro dut (.clk, .rst_n, .start, .funct3, .a, .b, .busy, .done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_div(input logic [2:0] f, input logic [31:0] x,
                                          input logic [31:0] y);
    longint sx, sy;
    sx = longint'($signed(x));
    sy = longint'($signed(y));
    unique case (f)
      3'd4: return (y == 0) ? 32'hFFFF_FFFF : 32'(sx / sy);
      3'd5: return (y == 0) ? 32'hFFFF_FFFF : x / y;
      3'd6: return (y == 0) ? x : 32'(sx % sy);
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction

  task automatic one(input logic [2:0] f, input logic [31:0] x, input logic [31:0] y);
    int lat, exp_lat;
    @(negedge clk);
    funct3 = f; a = x; b = y; start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done && lat < 100) begin
      @(negedge clk);
      lat++;
    end
    exp_lat = (y == 0 || (!f[0] && x == 32'h8000_0000 && y == 32'hFFFF_FFFF)) ? 1 : 34;
    checks++;
    if (result !== ref_div(f, x, y) || lat != exp_lat) begin
      failures++;
      $display("FAIL f3=%0d a=%h b=%h got %h exp %h latency %0d exp %0d", f, x, y, result,
               ref_div(f, x, y), lat, exp_lat);
    end
  endtask

  logic [31:0] corner [7] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                              32'h0000_0007, 32'hFFFF_FFF9};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 4; f < 8; f++)
      foreach (corner[i]) foreach (corner[j]) one(3'(f), corner[i], corner[j]);
    for (int k = 0; k < 1500; k++) begin
      logic [31:0] y;
      y = $urandom;
      if (k % 3 == 0) y = y >> $urandom_range(0, 31);
      one(3'($urandom_range(4, 7)), $urandom, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
