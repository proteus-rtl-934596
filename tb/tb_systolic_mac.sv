// tb_systolic_mac: two cores, one with FIRST = 0 and one with FIRST = 1,
// fed the same stream of random packets {a, s} at random gaps while their
// output is drained with a random ready. Expected outputs are worked out
// here: for the FIRST = 0 core packet k >= 1 yields {a_k, s_(k-1) + b*a_k}
// and packet 0 yields nothing; for the FIRST = 1 core every packet yields
// {a_k, b*a_k}. The MAC counters, the fixed destination, the latency of an
// idle core (result offered two cycles after the packet) and clear are
// checked as well.
module tb_systolic_mac;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, rx_valid;
  logic [LINK_W-1:0] rx_data;
  logic signed [15:0] b;
  logic tv [2], tr [2];
  logic [NODE_W-1:0] td [2];
  logic [LINK_W-1:0] tdat [2];
  logic [31:0] macs [2];

  systolic_mac #(.NEXT_NODE(7), .FIRST(1'b0)) dut0 (
    .clk, .rst_n, .clear, .b, .rx_valid, .rx_data,
    .tx_valid(tv[0]), .tx_ready(tr[0]), .tx_dst(td[0]), .tx_data(tdat[0]), .macs(macs[0]));
  systolic_mac #(.NEXT_NODE(3), .FIRST(1'b1)) dut1 (
    .clk, .rst_n, .clear, .b, .rx_valid, .rx_data,
    .tx_valid(tv[1]), .tx_ready(tr[1]), .tx_dst(td[1]), .tx_data(tdat[1]), .macs(macs[1]));

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  logic [LINK_W-1:0] exp0 [$], exp1 [$];
  logic signed [31:0] s_last;
  int got [2];

  // drain and compare
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (tv[c] && tr[c]) begin
      logic [LINK_W-1:0] e;
      check(td[c] == (c == 0 ? 7 : 3), $sformatf("core %0d destination %0d", c, td[c]));
      if (c == 0) begin
        if (exp0.size() == 0) check(0, "core 0 unexpected output");
        else begin e = exp0.pop_front(); check(tdat[0] == e, $sformatf("core 0 %h != %h", tdat[0], e)); end
      end else begin
        if (exp1.size() == 0) check(0, "core 1 unexpected output");
        else begin e = exp1.pop_front(); check(tdat[1] == e, $sformatf("core 1 %h != %h", tdat[1], e)); end
      end
      got[c]++;
    end
  end

  task automatic send(input logic signed [15:0] a, input logic signed [31:0] s, input bit first_pkt);
    rx_valid = 1; rx_data = {a, s};
    if (!first_pkt) exp0.push_back({a, 32'(s_last + 32'(b * a))});
    exp1.push_back({a, 32'(b * a)});
    s_last = s;
    @(negedge clk); rx_valid = 0;
  endtask

  initial begin
    clear = 0; rx_valid = 0; rx_data = '0; b = 0; tr[0] = 1; tr[1] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int run = 0; run < 2; run++) begin
      int n;
      logic signed [15:0] a; logic signed [31:0] s;
      clear = 1; @(negedge clk); clear = 0;
      check(macs[0] == 0 && macs[1] == 0, "clear resets the MAC counters");
      b = 16'($urandom);
      got[0] = 0; got[1] = 0;
      // latency of an idle core: packet at edge t, result queued at t+1,
      // offered (tx_valid) after that edge
      a = 16'($urandom); s = 32'($urandom);
      rx_valid = 1; rx_data = {a, s}; s_last = s;
      exp1.push_back({a, 32'(b * a)});
      @(negedge clk); rx_valid = 0;
      check(tv[1] == 1, "FIRST core offers its result one edge after the packet");
      check(tv[0] == 0, "non-first core holds back the first packet");
      n = 300;
      for (int k = 1; k < n; k++) begin
        a = 16'($urandom); s = 32'($urandom);
        tr[0] = ($urandom_range(3) != 0); tr[1] = ($urandom_range(3) != 0);
        send(a, s, 1'b0);
        if ($urandom_range(1)) begin
          tr[0] = 1; tr[1] = 1; repeat ($urandom_range(2)) @(negedge clk);
        end
      end
      tr[0] = 1; tr[1] = 1;
      repeat (20) @(negedge clk);
      check(exp0.size() == 0 && exp1.size() == 0, "all results delivered");
      check(got[0] == n - 1 && got[1] == n, $sformatf("result counts %0d %0d", got[0], got[1]));
      check(macs[0] == n - 1, $sformatf("core 0 MACs %0d", macs[0]));
      check(macs[1] == n, $sformatf("core 1 MACs %0d", macs[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
