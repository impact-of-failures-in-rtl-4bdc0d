// tb_proc_ni: drives the processor-side NI with RV32M requests and random
// on-off back-pressure. Checks the request packet (three flits; head with the
// multiplier or divider address chosen by funct3, the NI's own node and
// funct3; then the two operands, the last marked tail), that the head leaves
// the clock after the request when the network is on, that nothing is sent
// while off, and that the result of the response packet is handed to the core
// with a one-clock `cop_done` pulse.
module tb_proc_ni;
  import mpsoc_pkg::*;
  import rv_asm_pkg::*;

  localparam int NODE = 5;
  logic            clk = 0, rst_n = 0;
  node_t           mul_dest = 5'd18, div_dest = 5'd23;
  logic            cop_req = 0, cop_done;
  logic [2:0]      cop_funct3 = '0;
  logic [31:0]     cop_a = '0, cop_b = '0, cop_result;
  logic            out_valid, out_on = 0, in_valid = 0, in_on;
  flit_t           out_flit, in_flit = '0;
  int checks = 0, failures = 0;

  proc_ni #(.NODE(NODE)) dut (
    .clk, .rst_n, .mul_dest, .div_dest,
    .cop_req, .cop_funct3, .cop_a, .cop_b, .cop_done, .cop_result,
    .net_out_valid(out_valid), .net_out_flit(out_flit), .net_out_on(out_on),
    .net_in_valid(in_valid), .net_in_flit(in_flit), .net_in_on(in_on)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      flit_t got [3];
      int n, t, t_head;
      logic [31:0] res;
      bit first_on;
      @(negedge clk);
      cop_req = 1; cop_funct3 = 3'($urandom); cop_a = $urandom; cop_b = $urandom;
      first_on = (k % 2 == 0);
      out_on = first_on;
      n = 0; t = 0;
      while (n < 3) begin
        @(posedge clk);
        t++;
        if (out_valid) begin
          chk(out_on, "flit sent while off");
          got[n] = out_flit;
          if (n == 0) t_head = t;
          n++;
        end
        @(negedge clk);
        if (n > 0) out_on = ($urandom_range(0, 2) != 0);
        else if (t > 3) out_on = 1;
        chk(cop_done == 0, "done before response");
      end
      if (first_on) chk(t_head == 2, $sformatf("head latency %0d", t_head));
      chk(got[0].head && !got[0].tail, "head flags");
      chk(got[0].data[4:0] == (cop_funct3[2] ? div_dest : mul_dest), "destination");
      chk(got[0].data[9:5] == 5'(NODE), "source");
      chk(got[0].data[12:10] == cop_funct3, "funct3");
      chk(!got[1].head && !got[1].tail && got[1].data == cop_a, "operand a");
      chk(!got[2].head && got[2].tail && got[2].data == cop_b, "operand b");
      // response
      res = ref_mext(cop_funct3, cop_a, cop_b);
      repeat ($urandom_range(0, 5)) @(negedge clk);
      chk(in_on, "NI refuses flits");
      in_valid = 1; in_flit = '{head: 1'b1, tail: 1'b0, data: 32'(NODE)};
      @(negedge clk);
      in_flit = '{head: 1'b0, tail: 1'b1, data: res};
      @(negedge clk);
      in_valid = 0;
      chk(cop_done && cop_result == res, "result to core");
      @(negedge clk);
      cop_req = 0;
      chk(!cop_done, "done is one clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
