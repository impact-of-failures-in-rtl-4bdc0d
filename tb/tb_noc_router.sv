// tb_noc_router: all seven inputs of a router at (1,1,0) send random packets
// of one to four flits to random destinations while every output is turned
// on and off at random. Checks that each packet leaves by the XYZ output for
// its destination (worked out here), arrives whole and in order, is never
// interleaved with another packet on the same output (wormhole), arrives
// exactly once, and that no flit is sent while `on` is low. Also checks the
// one-clock hop: an isolated head flit leaves the clock after it enters.
module tb_noc_router;
  import mpsoc_pkg::*;

  localparam int MX = 1, MY = 1, MZ = 0;
  localparam int NPK = 60;

  logic  clk = 0, rst_n = 0;
  logic  in_valid [NPORTS], in_on [NPORTS], out_valid [NPORTS], out_on [NPORTS];
  flit_t in_flit [NPORTS], out_flit [NPORTS];
  int checks = 0, failures = 0;
  int received [int];
  bit drivers_done [NPORTS];
  bit free_run = 0;

  noc_router #(.MY_X(MX), .MY_Y(MY), .MY_Z(MZ)) dut (
    .clk, .rst_n, .in_valid, .in_flit, .in_on, .out_valid, .out_flit, .out_on
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_port(input int d);
    int x, y, z;
    x = d % 4; y = (d / 4) % 4; z = d / 16;
    if (x > MX) return 1;
    if (x < MX) return 2;
    if (y > MY) return 3;
    if (y < MY) return 4;
    if (z > MZ) return 5;
    if (z < MZ) return 6;
    return 0;
  endfunction

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // input drivers
  for (genvar i = 0; i < NPORTS; i++) begin : g_drv
    initial begin
      in_valid[i] = 0;
      in_flit[i]  = '0;
      drivers_done[i] = 0;
      wait (rst_n);
      for (int k = 0; k < NPK; k++) begin
        int len, dest, id;
        len  = $urandom_range(1, 4);
        dest = $urandom_range(0, 31);
        id   = i * 1000 + k;
        for (int s = 0; s < len; s++) begin
          @(negedge clk);
          in_valid[i] = 0;
          while (!in_on[i] || $urandom_range(0, 3) == 0) begin
            @(negedge clk);
          end
          in_valid[i] = 1;
          in_flit[i].head = (s == 0);
          in_flit[i].tail = (s == len - 1);
          in_flit[i].data = (s == 0) ? {16'(id), 11'(len), 5'(dest)} : {16'(id), 16'(s)};
        end
        @(negedge clk);
        in_valid[i] = 0;
      end
      drivers_done[i] = 1;
    end
  end

  // output monitors
  for (genvar o = 0; o < NPORTS; o++) begin : g_mon
    int cur_id = -1, cur_seq, cur_len;
    initial out_on[o] = 0;
    always @(negedge clk) out_on[o] <= free_run || ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && out_valid[o]) begin
      chk(out_on[o], "sent while off");
      if (out_flit[o].head) begin
        chk(cur_id < 0, $sformatf("output %0d: head inside a packet (interleaving)", o));
        cur_id  = int'(out_flit[o].data[31:16]);
        cur_len = int'(out_flit[o].data[15:5]);
        cur_seq = 1;
        chk(exp_port(int'(out_flit[o].data[4:0])) == o,
            $sformatf("packet %0d to %0d on output %0d", cur_id, out_flit[o].data[4:0], o));
        chk(!received.exists(cur_id), "packet delivered twice");
        received[cur_id] = 1;
      end else begin
        chk(cur_id >= 0 && int'(out_flit[o].data[31:16]) == cur_id &&
            int'(out_flit[o].data[15:0]) == cur_seq,
            $sformatf("output %0d: body flit out of place", o));
        cur_seq++;
      end
      if (out_flit[o].tail) begin
        chk(cur_seq == cur_len, "packet length");
        cur_id = -1;
      end
    end
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    all = 0;
    while (!all) begin
      @(negedge clk);
      all = 1;
      foreach (drivers_done[i]) all &= drivers_done[i];
    end
    repeat (50) @(negedge clk);
    chk(received.num() == NPORTS * NPK, $sformatf("%0d of %0d packets", received.num(), NPORTS * NPK));
    // one-clock hop on an idle router: west input to east output
    free_run = 1;
    repeat (3) @(negedge clk);
    in_valid[2] = 1;
    in_flit[2]  = '{head: 1'b1, tail: 1'b1, data: {16'd9999, 11'd1, 5'(node_id(3, 1, 0))}};
    @(negedge clk);
    in_valid[2] = 0;
    chk(out_valid[1] && out_flit[1].data[31:16] == 16'd9999, "one-clock hop");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
