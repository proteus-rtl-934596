// tb_packet_handler: the network interface of node 3 (4 VCs, 1-flit
// router buffers, packets of up to 4 flits, 4-entry source queue).
// Injection side: random packets are offered on tx_*; a model of the
// router's LOCAL input port takes flits into 1-flit VC buffers and frees
// them after a random delay, returning credits. Checks: the source queue
// refuses packets when full; each packet leaves as len flits on one VC,
// head first, with the right data slice, src, dst, creation time (cycle of
// acceptance) and injection time (cycle of the head flit); no flit is sent
// on a VC without a credit. Ejection side: packets from several sources
// arrive interleaved flit by flit on different VCs; each must be
// reassembled and shown on rx_* with its source, length, data and both
// latencies, and every flit's credit must come back one cycle later.
module tb_packet_handler;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NV = 4, MF = 4, LW = 3;

  logic [TS_W-1:0] now;
  logic tx_valid, tx_ready, rx_valid, inj_head;
  logic [NODE_W-1:0] tx_dst, rx_src;
  logic [LW-1:0] tx_len, rx_len;
  logic [MF*LINK_W-1:0] tx_data, rx_data;
  logic [TS_W-1:0] rx_net_lat, rx_queue_lat;
  flit_t to_r, from_r;
  credit_t c_from_r, c_to_r;

  packet_handler #(.NODE_ID(3), .NUM_VCS(NV), .BUF_DEPTH(1), .MAX_FLITS(MF), .SRC_DEPTH(4)) dut (
    .clk, .rst_n, .now, .tx_valid, .tx_ready, .tx_dst, .tx_len, .tx_data,
    .rx_valid, .rx_src, .rx_len, .rx_data, .rx_net_lat, .rx_queue_lat, .inj_head,
    .to_router(to_r), .credit_from_router(c_from_r), .from_router(from_r), .credit_to_router(c_to_r)
  );

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign now = TS_W'(cyc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  // ---------------- injection ----------------
  typedef struct { int dst; int len; logic [MF*LINK_W-1:0] data; int t_acc; } pkt_s;
  pkt_s sent_q [$];
  int busy_vc [NV];         // router buffer occupied: release cycle, -1 = empty
  bit vc_in_use [NV];       // VC allocated to a packet in flight
  int cur_vc = -1, cur_k = 0, cur_tinj = 0, inj_pkts = 0, full_seen = 0;
  pkt_s cur;

  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) full_seen++;
    if (tx_valid && tx_ready) begin
      pkt_s p;
      p.dst = int'(tx_dst); p.len = int'(tx_len); p.data = tx_data; p.t_acc = cyc;
      sent_q.push_back(p);
    end
    if (to_r.valid) begin
      int v;
      v = int'(to_r.vc);
      checks++;
      if (v >= NV || busy_vc[v] >= 0) begin failures++; $display("FAIL flit without credit vc %0d", v); end
      else begin
        bit ok;
        if (to_r.head) begin
          ok = (cur_vc < 0) && !vc_in_use[v] && sent_q.size() > 0;
          cur = sent_q.pop_front(); cur_vc = v; cur_k = 0; cur_tinj = cyc; vc_in_use[v] = 1;
          inj_pkts++;
          ok &= inj_head;
        end else ok = (cur_vc == v) && !inj_head;
        ok &= (int'(to_r.dst) == cur.dst) && (int'(to_r.src) == 3);
        ok &= (int'(to_r.t_create) == (cur.t_acc & 'hFFFF)) && (int'(to_r.t_inject) == (cur_tinj & 'hFFFF));
        ok &= (to_r.data == cur.data[cur_k*LINK_W +: LINK_W]);
        ok &= (to_r.tail == (cur_k == cur.len - 1));
        if (!ok) begin failures++; $display("FAIL %0t injected flit %0d of packet", $time, cur_k); end
        busy_vc[v] = cyc + int'($urandom_range(3, 1));
        cur_k++;
        if (to_r.tail) cur_vc = -1;
      end
    end
  end

  // router buffer model: release flits, return credits
  bit tail_in [NV];
  always @(negedge clk) begin
    c_from_r = CREDIT_IDLE;
    if (rst_n)
      for (int v = 0; v < NV; v++)
        if (!c_from_r.valid && busy_vc[v] >= 0 && busy_vc[v] <= cyc) begin
          c_from_r.valid = 1; c_from_r.vc = VC_W'(v);
          c_from_r.vc_free = tail_in[v];
          if (tail_in[v]) vc_in_use[v] = 0;
          busy_vc[v] = -1;
        end
  end
  always @(posedge clk) if (to_r.valid) tail_in[to_r.vc] = to_r.tail;

  // ---------------- ejection ----------------
  typedef struct { int src; int len; logic [MF*LINK_W-1:0] data; int tc; int ti; } ej_s;
  ej_s ej_exp [$];
  int ej_flits = 0, ej_got = 0;
  credit_t exp_credit;
  bit exp_credit_v = 0;

  always @(posedge clk) if (rst_n) begin
    // credit for the flit of the previous cycle
    if (exp_credit_v) check(c_to_r == exp_credit, "ejection credit");
    else check(!c_to_r.valid, "spurious ejection credit");
    exp_credit_v = from_r.valid;
    exp_credit.valid = 1; exp_credit.vc = from_r.vc; exp_credit.vc_free = from_r.tail;
    if (rx_valid) begin
      bit found;
      found = 0;
      foreach (ej_exp[i])
        if (!found && ej_exp[i].src == int'(rx_src)) begin
          check(int'(rx_len) == ej_exp[i].len && rx_data == ej_exp[i].data, "reassembled packet");
          check(int'(rx_queue_lat) == ej_exp[i].ti - ej_exp[i].tc, "queuing latency");
          check(int'(rx_net_lat) == (cyc - 1 - ej_exp[i].ti), $sformatf("network latency %0d", rx_net_lat));
          ej_exp.delete(i);
          found = 1;
          ej_got++;
        end
      check(found, "unexpected rx packet");
    end
  end

  initial begin
    tx_valid = 0; tx_dst = 0; tx_len = 0; tx_data = 0; from_r = FLIT_IDLE;
    foreach (busy_vc[v]) begin busy_vc[v] = -1; vc_in_use[v] = 0; tail_in[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      // injection stimulus
      for (int i = 0; i < 300; i++) begin
        @(negedge clk);
        tx_valid = 1;
        tx_dst = NODE_W'($urandom_range(15));
        tx_len = LW'($urandom_range(MF, 1));
        for (int k = 0; k < MF; k++) tx_data[k*LINK_W +: LINK_W] = LINK_W'({$urandom, $urandom});
        @(posedge clk);
        while (!tx_ready) @(posedge clk);
        #1 tx_valid = 0;
        if ($urandom_range(3) == 0) repeat ($urandom_range(20)) @(posedge clk);
      end
      // ejection stimulus: 4 packets at a time, one per VC, interleaved
      for (int r = 0; r < 60; r++) begin
        ej_s pk [NV];
        int k [NV], busy;
        for (int v = 0; v < NV; v++) begin
          pk[v].src = r * NV + v; pk[v].len = int'($urandom_range(MF, 1));
          pk[v].data = '0;
          for (int j = 0; j < pk[v].len; j++) pk[v].data[j*LINK_W +: LINK_W] = LINK_W'({$urandom, $urandom});
          pk[v].tc = cyc - 9; pk[v].ti = cyc - 4;
          k[v] = 0;
          ej_exp.push_back(pk[v]);
        end
        busy = NV;
        while (busy > 0) begin
          int v;
          @(negedge clk);
          from_r = FLIT_IDLE;
          v = int'($urandom_range(NV - 1));
          if (k[v] < pk[v].len) begin
            from_r.valid = 1; from_r.vc = VC_W'(v); from_r.head = (k[v] == 0);
            from_r.tail = (k[v] == pk[v].len - 1); from_r.src = NODE_W'(pk[v].src);
            from_r.dst = NODE_W'(3);
            from_r.t_create = TS_W'(pk[v].tc); from_r.t_inject = TS_W'(pk[v].ti);
            from_r.data = pk[v].data[k[v]*LINK_W +: LINK_W];
            k[v]++;
            if (k[v] == pk[v].len) busy--;
          end
        end
        @(negedge clk); from_r = FLIT_IDLE;
      end
    join
    repeat (300) @(posedge clk);
    check(inj_pkts == 300 && sent_q.size() == 0, $sformatf("injected %0d of 300", inj_pkts));
    check(ej_got == 240 && ej_exp.size() == 0, $sformatf("reassembled %0d of 240", ej_got));
    check(full_seen > 0, "source queue never full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
