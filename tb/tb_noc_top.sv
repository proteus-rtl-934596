// tb_noc_top: end-to-end test of the NoC at its default configuration
// (4x4 mesh, single-cycle routers, 4 VCs, 48-bit channels, XY routing).
//
// Part 1 drives the external packet ports: a single one-flit packet from
// node 0 to node 15 checks the zero-load latency (6 hops, one cycle per
// router: 7 cycles from injection to arrival); then every node sends
// packets of 1 to 4 flits to random nodes, and every packet must arrive
// exactly once, at its destination, with its source, length and data
// intact. Part 2 programs the traffic generators over AXI4-Lite, runs each
// destination pattern, checks every received packet against the pattern,
// drains the network and compares the statistics registers (sent against
// received, averages against sum/count computed here). A run at high load
// with a tiny deadlock threshold makes the detector fire, and the flag is
// cleared again. The test counts how often the mechanisms of the design
// happened (switch stalls, full source queues, multi-flit packets, dropped
// generator packets, deadlock flag, divider reads) and fails for any that
// never did.
module tb_noc_top;
  import noc_pkg::*;

  localparam int N     = 16;
  localparam int COLS  = 4;
  localparam int MAXF  = 4;
  localparam int LW    = $clog2(MAXF + 1);
  localparam int AW    = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0]  wstrb;
  logic [1:0]  bresp, rresp;

  logic                    tx_valid [N];
  logic                    tx_ready [N];
  logic [NODE_W-1:0]       tx_dst   [N];
  logic [LW-1:0]           tx_len   [N];
  logic [MAXF*LINK_W-1:0]  tx_data  [N];
  logic                    rx_valid [N];
  logic [NODE_W-1:0]       rx_src   [N];
  logic [LW-1:0]           rx_len   [N];
  logic [MAXF*LINK_W-1:0]  rx_data  [N];
  logic deadlock, stall;

  noc_top dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready),
    .s_wdata(wdata), .s_wstrb(wstrb), .s_wvalid(wvalid), .s_wready(wready),
    .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready),
    .s_rdata(rdata), .s_rresp(rresp), .s_rvalid(rvalid), .s_rready(rready),
    .ext_tx_valid(tx_valid), .ext_tx_ready(tx_ready), .ext_tx_dst(tx_dst),
    .ext_tx_len(tx_len), .ext_tx_data(tx_data),
    .ext_rx_valid(rx_valid), .ext_rx_src(rx_src), .ext_rx_len(rx_len),
    .ext_rx_data(rx_data), .deadlock(deadlock), .stall(stall)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_write(input logic [AW-1:0] a, input logic [31:0] d);
    awaddr <= a; wdata <= d; wstrb <= 4'hF; awvalid <= 1'b1; wvalid <= 1'b1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 1'b0; wvalid <= 1'b0;
    bready <= 1'b1;
    do @(posedge clk); while (!bvalid);
    bready <= 1'b0;
  endtask

  task automatic axi_read(input logic [AW-1:0] a, output logic [31:0] d);
    araddr <= a; arvalid <= 1'b1;
    do @(posedge clk); while (!arready);
    arvalid <= 1'b0;
    rready <= 1'b1;
    do @(posedge clk); while (!rvalid);
    d = rdata;
    rready <= 1'b0;
  endtask

  // ---------------- scoreboard for external packets ----------------
  // key = {dst, src, seq}; value = len
  int unsigned exp_len [int unsigned];
  int unsigned seq_of  [N];
  int          rx_count = 0, multi_flit = 0, q_full_seen = 0, stall_cycles = 0;
  bit          ext_mode = 1'b1;
  int          mode_pattern = -1;
  int          pattern_checked = 0;

  function automatic logic [LINK_W-1:0] word(input int src, input int seq, input int k);
    return LINK_W'({8'hA5, 10'(src), 24'(seq), 6'(k)});
  endfunction

  function automatic int pat_dst(input int p, input int s);
    logic [3:0] b, d;
    b = 4'(s);
    case (p)
      1: d = ~b;
      2: d = {b[0], b[1], b[2], b[3]};
      3: d = {b[2:0], b[3]};
      4: d = {b[1:0], b[3:2]};
      5: d = {b[0], b[3:1]};
      default: d = b;
    endcase
    return int'(d);
  endfunction

  always @(posedge clk) if (rst_n && stall) stall_cycles++;

  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (rst_n && tx_valid[n] && !tx_ready[n] && ext_mode) q_full_seen++;
      if (rst_n && rx_valid[n]) begin
        rx_count++;
        if (rx_len[n] > 1) multi_flit++;
        if (ext_mode) begin
          int unsigned seq, key;
          seq = int'(rx_data[n][29:6]);
          key = (n << 24) | (int'(rx_src[n]) << 16) | (seq & 'hFFFF);
          if (!exp_len.exists(key)) begin
            failures++; checks++;
            $display("FAIL: unexpected packet at %0d from %0d seq %0d", n, rx_src[n], seq);
          end else begin
            bit ok;
            ok = (int'(rx_len[n]) == exp_len[key]);
            for (int k = 0; k < int'(rx_len[n]); k++)
              if (rx_data[n][k*LINK_W +: LINK_W] != word(int'(rx_src[n]), int'(seq), k)) ok = 0;
            check(ok, $sformatf("packet data/len at %0d from %0d", n, rx_src[n]));
            exp_len.delete(key);
          end
        end else begin
          // generator packets: data carry {src, seq, flit index}
          bit ok;
          ok = 1;
          for (int k = 0; k < int'(rx_len[n]); k++) begin
            logic [LINK_W-1:0] w;
            w = rx_data[n][k*LINK_W +: LINK_W];
            if (int'(w[5:0]) != k || w[47:38] != rx_src[n]) ok = 0;
          end
          if (mode_pattern > 0) begin
            if (pat_dst(mode_pattern, int'(rx_src[n])) != n) ok = 0;
            pattern_checked++;
          end else if (int'(rx_src[n]) == n) ok = 0;
          if (!ok) begin
            failures++;
            $display("FAIL: generator packet at %0d from %0d (pattern %0d)", n, rx_src[n], mode_pattern);
          end
        end
      end
    end
  end

  // send one packet from node s (blocks until accepted)
  task automatic send(input int s, input int d, input int len);
    int unsigned key;
    int seq;
    seq = int'(seq_of[s]);
    seq_of[s]++;
    key = (d << 24) | (s << 16) | (seq & 'hFFFF);
    exp_len[key] = len;
    ext_sent++;
    tx_dst[s] <= NODE_W'(d);
    tx_len[s] <= LW'(len);
    for (int k = 0; k < MAXF; k++)
      tx_data[s][k*LINK_W +: LINK_W] <= (k < len) ? word(s, seq, k) : '0;
    tx_valid[s] <= 1'b1;
    do @(posedge clk); while (!tx_ready[s]);
    tx_valid[s] <= 1'b0;
  endtask

  task automatic drain(input int cycles_max);
    int quiet;
    quiet = 0;
    for (int i = 0; i < cycles_max && quiet < 100; i++) begin
      @(posedge clk);
      quiet = (rx_valid.or() || stall) ? 0 : quiet + 1;
    end
  endtask

  logic [31:0] r, sent_tot, recv_tot, sum_net, cnt, avg;
  int lat_seen, t0;
  int senders_done = 0, ext_sent = 0;
  int dl_seen = 0, dropped_tot = 0, div_reads = 0;

  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0;
    awaddr = '0; araddr = '0; wdata = '0; wstrb = '0;
    for (int n = 0; n < N; n++) begin
      tx_valid[n] = 0; tx_dst[n] = '0; tx_len[n] = '0; tx_data[n] = '0; seq_of[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // ---- zero-load latency, node 0 -> node 15 ----
    fork
      send(0, 15, 1);
      begin
        t0 = 0;
        while (!rx_valid[15]) begin @(posedge clk); t0++; end
      end
    join
    axi_read(20'h1000 + 15*64 + 'h0C, r);
    check(r == 7, $sformatf("zero-load latency 0->15 is %0d, expected 7", r));
    // a 4-flit packet: head latency 7, one more flit every 2 cycles (1-flit VC buffers)
    axi_write(20'h000, 32'h2);   // clear statistics
    send(0, 15, 4);
    drain(200);
    axi_read(20'h1000 + 15*64 + 'h0C, r);
    check(r == 7 + 2*3, $sformatf("4-flit latency 0->15 is %0d, expected 13", r));

    // ---- random external traffic with all lengths ----
    for (int s = 0; s < N; s++) begin
      automatic int ss = s;
      fork
        begin
          for (int i = 0; i < 40; i++) begin
            int d;
            d = int'($urandom_range(N - 1));
            send(ss, d, int'($urandom_range(MAXF, 1)));
          end
          senders_done++;
        end
      join_none
    end
    wait (senders_done == N);
    drain(5000);
    check(exp_len.num() == 0, $sformatf("%0d external packets never arrived", exp_len.num()));
    check(ext_sent == 2 + N * 40, $sformatf("only %0d external packets sent", ext_sent));
    check(deadlock == 0, "deadlock flag with detector off");

    // ---- synthetic traffic, every pattern ----
    ext_mode = 1'b0;
    axi_write(20'h010, 32'd0);         // detector off
    axi_write(20'h00C, 32'd1);         // 1-flit packets
    for (int p = 0; p < 6; p++) begin
      mode_pattern = p;
      axi_write(20'h000, 32'h2);       // clear statistics
      axi_write(20'h008, p);
      axi_write(20'h004, 32'd9830);    // 0.15 packets/node/cycle
      axi_write(20'h000, 32'h1);
      repeat (1500) @(posedge clk);
      axi_write(20'h000, 32'h0);
      drain(5000);
      sent_tot = 0; recv_tot = 0;
      for (int n = 0; n < N; n++) begin
        axi_read(20'h1000 + n*64 + 'h00, r); sent_tot += r;
        axi_read(20'h1000 + n*64 + 'h04, r); recv_tot += r;
      end
      check(sent_tot == recv_tot && sent_tot > 100,
            $sformatf("pattern %0d: sent %0d received %0d", p, sent_tot, recv_tot));
      // average latency register against sum / count, at node 5
      axi_read(20'h1000 + 5*64 + 'h0C, sum_net);
      axi_read(20'h1000 + 5*64 + 'h04, cnt);
      axi_read(20'h1000 + 5*64 + 'h18, avg);
      div_reads++;
      check(avg == ((cnt == 0) ? 0 : sum_net / cnt),
            $sformatf("pattern %0d: average %0d, sum %0d count %0d", p, avg, sum_net, cnt));
      $display("pattern %0d: %0d packets, node 5 average latency %0d", p, recv_tot, avg);
    end

    // ---- overload with a tiny deadlock threshold ----
    mode_pattern = 1;
    axi_write(20'h008, 32'd1);         // bit-complement
    axi_write(20'h00C, 32'd3);         // 3-flit packets
    axi_write(20'h010, 32'd3);         // a buffer stalled 3 cycles counts as deadlock
    axi_write(20'h004, 32'd52000);     // 0.79 packets/node/cycle: beyond saturation
    axi_write(20'h000, 32'h1);
    repeat (1500) @(posedge clk);
    axi_write(20'h000, 32'h0);
    drain(20000);
    axi_read(20'h014, r);
    dl_seen = int'(r[0]);
    check(r[0] == 1'b1, "deadlock detector did not fire under overload");
    for (int n = 0; n < N; n++) begin
      axi_read(20'h1000 + n*64 + 'h28, r);
      dropped_tot += int'(r);
    end
    axi_write(20'h000, 32'h4);         // clear deadlock flags
    repeat (2) @(posedge clk);
    axi_read(20'h014, r);
    check(r[0] == 1'b0 && deadlock == 1'b0, "deadlock flag did not clear");
    axi_read(20'h1000 + 'h1C, r);      // queuing-latency average, node 0
    div_reads++;
    axi_read(20'h020, r);
    check(rresp == 2'b10, "unmapped register should answer SLVERR");

    // ---- mechanisms ----
    $display("mechanisms: stall cycles %0d, full source queue %0d, multi-flit packets %0d, dropped %0d, deadlock %0d, divider reads %0d, pattern-checked packets %0d",
             stall_cycles, q_full_seen, multi_flit, dropped_tot, dl_seen, div_reads, pattern_checked);
    check(stall_cycles > 0, "no switch stall happened");
    check(q_full_seen > 0, "source queue never filled");
    check(multi_flit > 0, "no multi-flit packet");
    check(dropped_tot > 0, "generator never dropped a packet");
    check(pattern_checked > 0, "no generator packet checked");
    check(div_reads > 0, "divider never used");
    $display("received %0d packets in total", rx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
