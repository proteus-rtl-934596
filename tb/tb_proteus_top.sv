// tb_proteus_top: end-to-end test of the whole design at its default
// parameters, both halves running at the same time.
//
// NoC half (4x4 mesh, single-cycle routers, 4 VCs, 48-bit channels, XY
// routing): a single one-flit packet from node 0 to node 15 checks the
// zero-load latency (6 hops, one cycle per router: 7 cycles from injection
// to arrival) and a 4-flit packet the extra two cycles per body flit; then
// every node sends packets of 1 to 4 flits to random nodes, and every
// packet must arrive exactly once, at its destination, with its source,
// length and data intact. The traffic generators are programmed over
// AXI4-Lite, each destination pattern is run and every received packet
// checked against it; the statistics registers are compared with sums
// and averages computed here. An overload with a tiny deadlock threshold
// makes the detector fire, and the flag is cleared again.
//
// Systolic half (18-node ring): two convolutions of a random 64-element A
// with 16 random coefficients B; the 49 sums
// C_i = sum_{j=1..16} A_(i+j) B_j must land in the output memory in order,
// and the cores must report 904 multiply-accumulates per run.
//
// The test counts how often each mechanism happened (switch stalls, full
// source queues, multi-flit packets, dropped generator packets, deadlock
// flag, divider reads, pattern-checked packets, convolution sums) and
// fails for any that never did.
module tb_proteus_top;
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

  // systolic half
  localparam int K = 16, D = 64;
  logic signed [15:0] b_coef [K];
  logic a_wr_en, sys_start, sys_clear, sys_busy;
  logic [5:0] a_wr_addr, res_addr;
  logic [15:0] a_wr_data;
  logic [6:0] sys_len, res_count;
  logic [31:0] res_data, macs_total;
  logic s_awready, s_wready, s_bvalid, s_arready, s_rvalid, sys_dl;
  logic [1:0] s_bresp, s_rresp;
  logic [31:0] s_rdata;

  proteus_top dut (
    .clk, .rst_n,
    .mesh_s_awaddr(awaddr), .mesh_s_awvalid(awvalid), .mesh_s_awready(awready),
    .mesh_s_wdata(wdata), .mesh_s_wstrb(wstrb), .mesh_s_wvalid(wvalid), .mesh_s_wready(wready),
    .mesh_s_bresp(bresp), .mesh_s_bvalid(bvalid), .mesh_s_bready(bready),
    .mesh_s_araddr(araddr), .mesh_s_arvalid(arvalid), .mesh_s_arready(arready),
    .mesh_s_rdata(rdata), .mesh_s_rresp(rresp), .mesh_s_rvalid(rvalid), .mesh_s_rready(rready),
    .mesh_tx_valid(tx_valid), .mesh_tx_ready(tx_ready), .mesh_tx_dst(tx_dst),
    .mesh_tx_len(tx_len), .mesh_tx_data(tx_data),
    .mesh_rx_valid(rx_valid), .mesh_rx_src(rx_src), .mesh_rx_len(rx_len),
    .mesh_rx_data(rx_data), .mesh_deadlock(deadlock), .mesh_stall(stall),
    .sys_b_coef(b_coef), .sys_a_wr_en(a_wr_en), .sys_a_wr_addr(a_wr_addr), .sys_a_wr_data(a_wr_data),
    .sys_start(sys_start), .sys_len(sys_len), .sys_clear(sys_clear), .sys_busy(sys_busy),
    .sys_res_count(res_count), .sys_res_addr(res_addr), .sys_res_data(res_data),
    .sys_macs_total(macs_total),
    .sys_s_awaddr('0), .sys_s_awvalid(1'b0), .sys_s_awready(s_awready), .sys_s_wdata('0),
    .sys_s_wstrb('0), .sys_s_wvalid(1'b0), .sys_s_wready(s_wready), .sys_s_bresp(s_bresp),
    .sys_s_bvalid(s_bvalid), .sys_s_bready(1'b1), .sys_s_araddr('0), .sys_s_arvalid(1'b0),
    .sys_s_arready(s_arready), .sys_s_rdata(s_rdata), .sys_s_rresp(s_rresp), .sys_s_rvalid(s_rvalid),
    .sys_s_rready(1'b1), .sys_deadlock(sys_dl)
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


  // ---------------- systolic convolution, in parallel ----------------
  logic signed [15:0] av [D];
  int sys_done = 0, sums_ok = 0;
  initial begin
    a_wr_en = 0; sys_start = 0; sys_clear = 0; sys_len = 0; a_wr_addr = 0; a_wr_data = 0;
    res_addr = 0;
    foreach (b_coef[j]) b_coef[j] = 0;
    wait (rst_n);
    for (int run = 0; run < 2; run++) begin
      @(negedge clk); sys_clear = 1; @(negedge clk); sys_clear = 0;
      foreach (b_coef[j]) b_coef[j] = 16'($signed($urandom_range(255)) - 128);
      for (int i = 0; i < D; i++) begin
        av[i] = 16'($signed($urandom_range(2047)) - 1024);
        a_wr_en = 1; a_wr_addr = 6'(i); a_wr_data = av[i];
        @(negedge clk);
      end
      a_wr_en = 0;
      sys_len = 7'(D); sys_start = 1; @(negedge clk); sys_start = 0;
      while (int'(res_count) < D - K + 1) @(negedge clk);
      repeat (50) @(negedge clk);
      check(int'(res_count) == D - K + 1, $sformatf("systolic run %0d: %0d results", run, res_count));
      for (int i = 0; i <= D - K; i++) begin
        int c;
        c = 0;
        for (int j = 1; j <= K; j++) c += int'(av[i + j - 1]) * int'(b_coef[j-1]);
        res_addr = 6'(i);
        @(negedge clk);
        check(res_data == 32'(c), $sformatf("systolic run %0d: C_%0d = %0d, expected %0d", run, i, $signed(res_data), c));
        if (res_data == 32'(c)) sums_ok++;
      end
      check(macs_total == 32'(K * (2 * D - K + 1) / 2), $sformatf("systolic MACs %0d", macs_total));
      check(!sys_dl, "systolic ring deadlock flag");
    end
    sys_done = 1;
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
    wait (sys_done == 1);
    $display("mechanisms: stall cycles %0d, full source queue %0d, multi-flit packets %0d, dropped %0d, deadlock %0d, divider reads %0d, pattern-checked packets %0d, convolution sums %0d",
             stall_cycles, q_full_seen, multi_flit, dropped_tot, dl_seen, div_reads, pattern_checked, sums_ok);
    check(stall_cycles > 0, "no switch stall happened");
    check(q_full_seen > 0, "source queue never filled");
    check(multi_flit > 0, "no multi-flit packet");
    check(dropped_tot > 0, "generator never dropped a packet");
    check(pattern_checked > 0, "no generator packet checked");
    check(div_reads > 0, "divider never used");
    check(sums_ok == 2 * (D - K + 1), "not every convolution sum was right");
    $display("received %0d packets in total", rx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
