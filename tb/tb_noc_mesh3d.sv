// tb_noc_mesh3d: every one of the 32 nodes sends random packets of one to
// four flits to random nodes through the 4x4x2 mesh, while the receiving
// network interfaces turn `on` on and off at random. Checks that every packet
// arrives exactly once, whole and in order, at the local port of its
// destination and never interleaved with another packet. Then, on the idle
// network, checks the latency of single packets: the head reaches the
// destination's local output hops + 1 clocks after it was offered, hops being
// the Manhattan distance worked out here.
module tb_noc_mesh3d;
  import mpsoc_pkg::*;

  localparam int NPK = 20;

  logic  clk = 0, rst_n = 0;
  logic  in_valid [NODES], in_on [NODES], out_valid [NODES], out_on [NODES];
  flit_t in_flit [NODES], out_flit [NODES];
  int checks = 0, failures = 0;
  int received [int];
  bit drivers_done [NODES];
  bit free_run = 0;

  noc_mesh3d dut (
    .clk, .rst_n,
    .loc_in_valid(in_valid), .loc_in_flit(in_flit), .loc_in_on(in_on),
    .loc_out_valid(out_valid), .loc_out_flit(out_flit), .loc_out_on(out_on)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int manhattan(input int a, input int b);
    int d;
    d = (a % 4 > b % 4) ? a % 4 - b % 4 : b % 4 - a % 4;
    d += ((a / 4) % 4 > (b / 4) % 4) ? (a / 4) % 4 - (b / 4) % 4 : (b / 4) % 4 - (a / 4) % 4;
    d += (a / 16 > b / 16) ? a / 16 - b / 16 : b / 16 - a / 16;
    return d;
  endfunction

  for (genvar i = 0; i < NODES; i++) begin : g_drv
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
          while (!in_on[i] || $urandom_range(0, 2) == 0) @(negedge clk);
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

  for (genvar o = 0; o < NODES; o++) begin : g_mon
    int cur_id = -1, cur_seq, cur_len;
    initial out_on[o] = 0;
    always @(negedge clk) out_on[o] <= free_run || ($urandom_range(0, 3) != 0);
    always @(posedge clk) if (rst_n && out_valid[o]) begin
      if (out_flit[o].head) begin
        chk(cur_id < 0, "interleaved packets");
        cur_id  = int'(out_flit[o].data[31:16]);
        cur_len = int'(out_flit[o].data[15:5]);
        cur_seq = 1;
        chk(int'(out_flit[o].data[4:0]) == o, $sformatf("packet for %0d at node %0d", out_flit[o].data[4:0], o));
        chk(!received.exists(cur_id), $sformatf("delivered twice id %0d at %0d t=%0t", cur_id, o, $time));
        received[cur_id] = 1;
      end else begin
        chk(cur_id >= 0 && int'(out_flit[o].data[31:16]) == cur_id &&
            int'(out_flit[o].data[15:0]) == cur_seq, "body flit out of place");
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
    repeat (100) @(negedge clk);
    chk(received.num() == NODES * NPK, $sformatf("%0d of %0d packets", received.num(), NODES * NPK));
    // latency on the idle network
    free_run = 1;
    for (int k = 0; k < 40; k++) begin
      int s, d, t;
      s = $urandom_range(0, 31);
      d = $urandom_range(0, 31);
      repeat (3) @(negedge clk);
      in_valid[s] = 1;
      in_flit[s] = '{head: 1'b1, tail: 1'b1, data: {16'(60000 + k), 11'd1, 5'(d)}};
      @(negedge clk);
      in_valid[s] = 0;
      t = 1;
      while (!out_valid[d] && t < 50) begin
        @(negedge clk);
        t++;
      end
      chk(t == manhattan(s, d) + 1, $sformatf("latency %0d -> %0d: %0d clocks, %0d hops", s, d, t, manhattan(s, d)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
