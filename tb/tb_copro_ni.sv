// tb_copro_ni: sends request packets to the coprocessor-side NI, with a
// testbench arithmetic unit that answers after a random delay with
// a + b + funct3. Checks that the unit sees funct3 and both operands, that
// the response goes back to the requesting node with the result as tail,
// that no new request is accepted (`net_in_on` low) while one is served,
// that nothing is sent while off, and that with `fault` set the NI drains
// requests and never answers.
module tb_copro_ni;
  import mpsoc_pkg::*;

  localparam int NODE = 21;
  logic        clk = 0, rst_n = 0, fault = 0;
  logic        unit_start, unit_done = 0;
  logic [2:0]  unit_funct3;
  logic [31:0] unit_a, unit_b, unit_result = '0;
  logic        out_valid, out_on = 1, in_valid = 0, in_on;
  flit_t       out_flit, in_flit = '0;
  int checks = 0, failures = 0, n_start = 0;

  copro_ni #(.NODE(NODE)) dut (
    .clk, .rst_n, .fault,
    .unit_start, .unit_funct3, .unit_a, .unit_b, .unit_done, .unit_result,
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

  // unit model
  initial forever begin
    @(negedge clk);
    if (unit_start) begin
      logic [31:0] r;
      n_start++;
      r = unit_a + unit_b + 32'(unit_funct3);
      repeat ($urandom_range(1, 6)) @(negedge clk);
      unit_done = 1; unit_result = r;
      @(negedge clk);
      unit_done = 0;
    end
  end

  task automatic send(input flit_t f);
    @(negedge clk);
    while (!in_on) @(negedge clk);
    in_valid = 1; in_flit = f;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      logic [4:0] src;
      logic [2:0] f3;
      logic [31:0] a, b;
      flit_t got [2];
      int n;
      src = 5'($urandom_range(0, 15)); f3 = 3'($urandom); a = $urandom; b = $urandom;
      send('{head: 1'b1, tail: 1'b0, data: {19'b0, f3, src, 5'(NODE)}});
      send('{head: 1'b0, tail: 1'b0, data: a});
      send('{head: 1'b0, tail: 1'b1, data: b});
      n = 0;
      while (n < 2) begin
        @(posedge clk);
        if (out_valid) begin
          chk(out_on, "sent while off");
          got[n] = out_flit; n++;
        end
        if (n < 2) chk(!in_on, "accepts a second request while busy");
        @(negedge clk);
        out_on = ($urandom_range(0, 2) != 0);
      end
      chk(got[0].head && !got[0].tail && got[0].data[4:0] == src && got[0].data[9:5] == 5'(NODE),
          "response head");
      chk(got[1].tail && got[1].data == a + b + 32'(f3), "response result");
    end
    // failed coprocessor: requests are drained, never answered
    fault = 1;
    n_start = 0;
    for (int k = 0; k < 5; k++) begin
      send('{head: 1'b1, tail: 1'b0, data: 32'(NODE)});
      send('{head: 1'b0, tail: 1'b0, data: 1});
      send('{head: 1'b0, tail: 1'b1, data: 2});
    end
    repeat (20) begin
      @(posedge clk);
      chk(!out_valid && in_on, "failed coprocessor answered or blocked");
    end
    chk(n_start == 0, "failed coprocessor started its unit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
