// tb_router: one router (node 5 of a 4x4 mesh, XY routing, 4 VCs of one
// flit) surrounded by models of its five neighbours. Each neighbour model
// sends packets of 1 to 4 flits to random nodes with credit-based flow
// control of its own, and sinks whatever the router sends it, returning
// credits after a random delay. Checks: each flit leaves by the XY port of
// its destination; the flits of a packet arrive in order and together on
// one downstream VC; every packet arrives exactly once with its data; the
// router never uses a VC id outside 0..3. A lone flit must leave one cycle
// after it was written (single-cycle router), and two cycles later on a
// second router built with the output register.
module tb_router;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NV = 4;
  flit_t   in_f [NPORTS], out_f [NPORTS], in2 [NPORTS], out2 [NPORTS];
  credit_t cout [NPORTS], cin [NPORTS], cout2 [NPORTS], cin2 [NPORTS];
  logic dl, stall, dl2, stall2;

  router #(.TOPOLOGY(TOPO_MESH), .ROUTING(RT_XY), .COLS(4), .ROWS(4), .MY_ID(5),
           .NUM_VCS(NV), .BUF_DEPTH(1), .OUT_REG(1'b0)) dut (
    .clk, .rst_n, .in_flit(in_f), .credit_out(cout), .out_flit(out_f), .credit_in(cin),
    .dl_threshold(16'd0), .dl_clear(1'b0), .deadlock(dl), .stall(stall)
  );
  router #(.TOPOLOGY(TOPO_MESH), .ROUTING(RT_XY), .COLS(4), .ROWS(4), .MY_ID(5),
           .NUM_VCS(NV), .BUF_DEPTH(1), .OUT_REG(1'b1)) dut2 (
    .clk, .rst_n, .in_flit(in2), .credit_out(cout2), .out_flit(out2), .credit_in(cin2),
    .dl_threshold(16'd0), .dl_clear(1'b0), .deadlock(dl2), .stall(stall2)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  function automatic port_e xy(input int d);
    int sx = 1, sy = 1, dx, dy;
    dx = d % 4; dy = d / 4;
    if (dx > sx) return P_EAST;
    if (dx < sx) return P_WEST;
    if (dy > sy) return P_NORTH;
    if (dy < sy) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // ---------------- upstream models ----------------
  int up_cred [NPORTS][NV];
  bit up_free [NPORTS][NV];
  int sent_pkts = 0, recv_pkts = 0;
  int unsigned exp_pkt [int unsigned];   // key {port,seq} -> {dst,len}
  bit sending = 0;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++)
      if (cout[p].valid) begin
        up_cred[p][cout[p].vc]++;
        if (cout[p].vc_free) up_free[p][cout[p].vc] = 1;
      end
  end

  task automatic send_pkt(input int p, input int seq, input int d, input int len);
    int vc;
    vc = -1;
    while (vc < 0) begin
      @(negedge clk);
      for (int v = 0; v < NV; v++) if (vc < 0 && up_free[p][v]) vc = v;
    end
    up_free[p][vc] = 0;
    exp_pkt[(p << 16) | seq] = (d << 8) | len;
    sent_pkts++;
    for (int k = 0; k < len; k++) begin
      while (up_cred[p][vc] == 0) begin in_f[p] = FLIT_IDLE; @(negedge clk); end
      in_f[p] = FLIT_IDLE;
      in_f[p].valid = 1; in_f[p].head = (k == 0); in_f[p].tail = (k == len - 1);
      in_f[p].vc = VC_W'(vc); in_f[p].src = NODE_W'(p); in_f[p].dst = NODE_W'(d);
      in_f[p].data = LINK_W'({8'(p), 16'(seq), 8'(k)});
      up_cred[p][vc]--;
      @(negedge clk);
      in_f[p] = FLIT_IDLE;
    end
  endtask

  // ---------------- downstream models ----------------
  // per output and VC: the packet in progress (-1 = none) and next flit index
  int cur_key [NPORTS][NV];
  int cur_k   [NPORTS][NV];
  credit_t pend [NPORTS][$];
  int      pend_t [NPORTS][$];
  int      cyc = 0;
  int      stalls = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && stall) stalls++;
    for (int o = 0; o < NPORTS; o++) begin
      if (rst_n && out_f[o].valid) begin
        int v, key;
        credit_t c;
        v = int'(out_f[o].vc);
        key = (int'(out_f[o].data[47:40]) << 16) | int'(out_f[o].data[39:8]);
        checks++;
        if (v >= NV) begin failures++; $display("FAIL vc %0d", v); end
        else begin
          bit ok;
          ok = (xy(int'(out_f[o].dst)) == port_e'(o));
          if (out_f[o].head) begin
            ok &= (cur_key[o][v] < 0) && exp_pkt.exists(key);
            cur_key[o][v] = key; cur_k[o][v] = 0;
          end else ok &= (cur_key[o][v] == key);
          ok &= (int'(out_f[o].data[7:0]) == cur_k[o][v]);
          cur_k[o][v]++;
          if (out_f[o].tail) begin
            if (exp_pkt.exists(key)) begin
              ok &= (int'(exp_pkt[key] & 'hFF) == cur_k[o][v]) && (int'(exp_pkt[key] >> 8) == int'(out_f[o].dst));
              exp_pkt.delete(key);
            end
            recv_pkts++;
            cur_key[o][v] = -1;
          end
          if (!ok) begin failures++; $display("FAIL %0t flit at out %0d vc %0d key %h", $time, o, v, key); end
        end
        c.valid = 1; c.vc = out_f[o].vc; c.vc_free = out_f[o].tail;
        pend[o].push_back(c);
        pend_t[o].push_back(cyc + int'($urandom_range(3)));
      end
    end
  end

  always @(negedge clk) begin
    for (int o = 0; o < NPORTS; o++) begin
      cin[o] = CREDIT_IDLE;
      if (pend[o].size() > 0 && pend_t[o][0] <= cyc) begin
        cin[o] = pend[o].pop_front();
        void'(pend_t[o].pop_front());
      end
    end
  end

  int t_in, lat1, lat2;
  int senders_done = 0;
  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      in_f[p] = FLIT_IDLE; in2[p] = FLIT_IDLE; cin[p] = CREDIT_IDLE; cin2[p] = CREDIT_IDLE;
      for (int v = 0; v < NV; v++) begin
        up_cred[p][v] = 1; up_free[p][v] = 1; cur_key[p][v] = -1; cur_k[p][v] = 0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- zero-load latency: a flit written at edge t leaves in cycle t+1 ----
    @(negedge clk);
    in2[P_WEST] = FLIT_IDLE;
    in2[P_WEST].valid = 1; in2[P_WEST].head = 1; in2[P_WEST].tail = 1; in2[P_WEST].dst = NODE_W'(6);
    @(negedge clk);
    in2[P_WEST] = FLIT_IDLE;
    lat2 = 1;
    while (!out2[P_EAST].valid && lat2 < 10) begin @(negedge clk); lat2++; end
    check(lat2 == 2, $sformatf("two-cycle router latency %0d, expected 2", lat2));

    fork
      send_pkt(P_WEST, 999, 6, 1);
      begin
        lat1 = 0;
        @(negedge clk);   // flit is on the link in this cycle, written at the next edge
        while (!out_f[P_EAST].valid && lat1 < 10) begin @(negedge clk); lat1++; end
      end
    join
    check(lat1 == 1, $sformatf("single-cycle router latency %0d, expected 1", lat1));
    repeat (5) @(negedge clk);

    // ---- random traffic from all five inputs ----
    for (int p = 0; p < NPORTS; p++) begin
      automatic int pp = p;
      fork
        begin
          for (int i = 0; i < 150; i++)
            send_pkt(pp, i, int'($urandom_range(15)), int'($urandom_range(4, 1)));
          senders_done++;
        end
      join_none
    end
    wait (senders_done == NPORTS);
    repeat (200) @(negedge clk);
    check(exp_pkt.num() == 0, $sformatf("%0d packets lost", exp_pkt.num()));
    check(sent_pkts == 5 * 150 + 1, $sformatf("only %0d packets sent", sent_pkts));
    check(recv_pkts == sent_pkts, $sformatf("sent %0d received %0d", sent_pkts, recv_pkts));
    check(stalls > 0, "no stall under contention");
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NV; v++)
        check(up_free[p][v] && up_cred[p][v] == 1, $sformatf("credit/VC not returned on input %0d vc %0d", p, v));
    $display("router: %0d packets, %0d stall cycles", recv_pkts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
