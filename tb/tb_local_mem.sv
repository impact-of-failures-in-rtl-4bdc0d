// tb_local_mem: random word and byte writes on the data port, checked
// against a reference array through both the data and the instruction read
// ports, including address wrap-around beyond the memory size.
module tb_local_mem;
  import mpsoc_pkg::*;

  localparam int WORDS = 4096;
  logic        clk = 0;
  logic [31:0] i_addr = '0, i_rdata, d_addr = '0, d_wdata = '0, d_rdata;
  logic        d_we = 0;
  logic [3:0]  d_be = '0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  local_mem #(.WORDS(WORDS)) dut (.clk, .i_addr, .i_rdata, .d_addr, .d_we, .d_be, .d_wdata, .d_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      d_we = 1; d_be = 4'hF; d_addr = 32'(4 * w); d_wdata = $urandom; model[w] = d_wdata;
    end
    @(negedge clk) d_we = 0;
    for (int k = 0; k < 6000; k++) begin
      int w;
      w = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        d_we = 1; d_be = 4'($urandom); d_wdata = $urandom;
        d_addr = 32'(4 * w) + ((k % 5 == 0) ? 32'(4 * WORDS) : 0);   // aliases wrap
        for (int b = 0; b < 4; b++) if (d_be[b]) model[w][8*b +: 8] = d_wdata[8*b +: 8];
      end else begin
        d_we = 0;
        d_addr = 32'(4 * w) | 32'($urandom_range(0, 3));
        i_addr = 32'(4 * ((w + 7) % WORDS));
        #1;
        checks += 2;
        if (d_rdata !== model[w]) begin
          failures++; $display("FAIL data port word %0d: %h exp %h", w, d_rdata, model[w]);
        end
        if (i_rdata !== model[(w + 7) % WORDS]) begin
          failures++; $display("FAIL instruction port word %0d", (w + 7) % WORDS);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
