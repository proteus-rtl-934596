// tb_latency_stats: random injection and reception events with random
// latencies; every counter, both latency sums and the maximum must equal
// the totals kept here, and clear must zero them all.
module tb_latency_stats;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, inj, rxv;
  logic [2:0] len;
  logic [TS_W-1:0] nl, ql;
  logic [31:0] sent, recv, flits, snl, sql, mx;

  latency_stats #(.LEN_W(3)) dut (
    .clk, .rst_n, .clear, .inj_head(inj), .rx_valid(rxv), .rx_len(len),
    .rx_net_lat(nl), .rx_queue_lat(ql), .pkts_sent(sent), .pkts_recv(recv),
    .flits_recv(flits), .sum_net_lat(snl), .sum_queue_lat(sql), .max_net_lat(mx)
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint e_s, e_r, e_f, e_n, e_q, e_m;
  initial begin
    clear = 0; inj = 0; rxv = 0; len = 0; nl = 0; ql = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      e_s = 0; e_r = 0; e_f = 0; e_n = 0; e_q = 0; e_m = 0;
      for (int i = 0; i < 2000; i++) begin
        @(negedge clk);
        checks++;
        if (sent != 32'(e_s) || recv != 32'(e_r) || flits != 32'(e_f) || snl != 32'(e_n) ||
            sql != 32'(e_q) || mx != 32'(e_m)) begin
          failures++; if (failures < 5) $display("FAIL at %0d", i);
        end
        inj = $urandom_range(1); rxv = $urandom_range(1);
        len = 3'($urandom_range(4, 1)); nl = TS_W'($urandom_range(300)); ql = TS_W'($urandom_range(50));
        if (inj) e_s++;
        if (rxv) begin
          e_r++; e_f += len; e_n += nl; e_q += ql;
          if (nl > e_m) e_m = nl;
        end
      end
      @(negedge clk); inj = 0; rxv = 0; clear = 1;
      @(negedge clk); clear = 0;
      checks++;
      if (sent != 0 || recv != 0 || flits != 0 || snl != 0 || sql != 0 || mx != 0) begin
        failures++; $display("FAIL clear");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
