// tb_axil_regs: the AXI4-Lite register block with 4 nodes of statistics
// driven by the testbench. Checks: configuration registers read back what
// was written and drive the outputs; clear bits give one-cycle pulses;
// every statistics register of every node reads its input; averages equal
// sum / count computed here (0 for a count of 0) for random values and
// arrive 33 cycles after the address, other reads in one; the cycle
// counter, node count and deadlock summary; SLVERR for unmapped addresses.
module tb_axil_regs;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NN = 4, AW = 20;

  logic [AW-1:0] awaddr, araddr;
  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic tg_enable, stats_clear, dl_clear;
  logic [15:0] rate, dl_threshold;
  pattern_e pattern;
  logic [7:0] pkt_len;
  node_stats_t stats [NN];
  logic [31:0] cycles;

  axil_regs #(.NUM_NODES(NN), .ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_awaddr(awaddr), .s_awvalid(awvalid), .s_awready(awready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_wvalid(wvalid), .s_wready(wready), .s_bresp(bresp), .s_bvalid(bvalid), .s_bready(bready),
    .s_araddr(araddr), .s_arvalid(arvalid), .s_arready(arready), .s_rdata(rdata), .s_rresp(rresp),
    .s_rvalid(rvalid), .s_rready(rready),
    .tg_enable, .rate, .pattern, .pkt_len, .dl_threshold, .stats_clear, .dl_clear, .stats, .cycles
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  int clr_pulses = 0, dlc_pulses = 0;
  always @(posedge clk) begin
    if (stats_clear) clr_pulses++;
    if (dl_clear) dlc_pulses++;
  end
  always @(posedge clk or negedge rst_n) if (!rst_n) cycles <= 0; else cycles <= cycles + 1;

  task automatic wr(input logic [AW-1:0] a, input logic [31:0] d, output logic [1:0] resp);
    awaddr <= a; wdata <= d; wstrb <= 4'hF; awvalid <= 1; wvalid <= 1;
    do @(posedge clk); while (!(awready && wready));
    awvalid <= 0; wvalid <= 0; bready <= 1;
    do @(posedge clk); while (!bvalid);
    resp = bresp;
    bready <= 0;
  endtask

  task automatic rd(input logic [AW-1:0] a, output logic [31:0] d, output logic [1:0] resp, output int lat);
    araddr <= a; arvalid <= 1;
    do @(posedge clk); while (!arready);
    arvalid <= 0; rready <= 1;
    lat = 0;
    do begin @(posedge clk); lat++; end while (!rvalid);
    d = rdata; resp = rresp;
    rready <= 0;
  endtask

  logic [31:0] d, c0, c1;
  logic [1:0] resp;
  int lat;
  initial begin
    awvalid = 0; wvalid = 0; bready = 0; arvalid = 0; rready = 0; awaddr = 0; araddr = 0;
    wdata = 0; wstrb = 0;
    for (int n = 0; n < NN; n++) stats[n] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // configuration
    wr('h004, 32'h1234, resp); check(resp == 0 && rate == 16'h1234, "rate");
    wr('h008, 32'd4, resp);    check(pattern == PAT_TRANSPOSE, "pattern");
    wr('h00C, 32'd3, resp);    check(pkt_len == 8'd3, "pkt_len");
    wr('h010, 32'd77, resp);   check(dl_threshold == 16'd77, "dl_threshold");
    wr('h000, 32'h1, resp);    check(tg_enable, "tg_enable");
    wr('h000, 32'h7, resp);    repeat (2) @(posedge clk);
    check(clr_pulses == 1 && dlc_pulses == 1 && tg_enable, "clear pulses");
    wr('h300, 32'h1, resp);    check(resp == 2'b10, "write SLVERR");
    rd('h004, d, resp, lat);   check(d == 32'h1234 && lat == 1, $sformatf("rate readback %h lat %0d", d, lat));
    rd('h008, d, resp, lat);   check(d == 4, "pattern readback");
    rd('h00C, d, resp, lat);   check(d == 3, "pkt_len readback");
    rd('h010, d, resp, lat);   check(d == 77, "threshold readback");
    rd('h01C, d, resp, lat);   check(d == NN, "node count");
    rd('h018, c0, resp, lat);  rd('h018, c1, resp, lat);
    check(c1 > c0 && c1 - c0 < 10, "cycle counter");
    rd('h024, d, resp, lat);   check(resp == 2'b10, "read SLVERR");
    rd('h1000 + NN*64, d, resp, lat); check(resp == 2'b10, "node out of range");
    rd('h014, d, resp, lat);   check(d == 0, "no deadlock");
    stats[2].deadlock = 1;
    rd('h014, d, resp, lat);   check(d == 1, "deadlock summary");
    rd('h1000 + 2*64 + 'h20, d, resp, lat); check(d == 1, "node deadlock");
    // statistics
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < NN; n++) begin
        stats[n].pkts_sent = $urandom; stats[n].pkts_recv = (t == 0) ? 0 : $urandom_range(100000);
        stats[n].flits_recv = $urandom; stats[n].sum_net_lat = $urandom;
        stats[n].sum_queue_lat = $urandom_range(1000000); stats[n].max_net_lat = $urandom;
        stats[n].generated = $urandom; stats[n].dropped = $urandom;
      end
      for (int n = 0; n < NN; n++) begin
        logic [AW-1:0] b;
        b = AW'('h1000 + n * 64);
        rd(b + 'h00, d, resp, lat); check(d == stats[n].pkts_sent, "sent");
        rd(b + 'h04, d, resp, lat); check(d == stats[n].pkts_recv, "recv");
        rd(b + 'h08, d, resp, lat); check(d == stats[n].flits_recv, "flits");
        rd(b + 'h0C, d, resp, lat); check(d == stats[n].sum_net_lat, "sum net");
        rd(b + 'h10, d, resp, lat); check(d == stats[n].sum_queue_lat, "sum queue");
        rd(b + 'h14, d, resp, lat); check(d == stats[n].max_net_lat, "max");
        rd(b + 'h24, d, resp, lat); check(d == stats[n].generated, "generated");
        rd(b + 'h28, d, resp, lat); check(d == stats[n].dropped, "dropped");
        rd(b + 'h18, d, resp, lat);
        check(d == ((stats[n].pkts_recv == 0) ? 0 : stats[n].sum_net_lat / stats[n].pkts_recv) && resp == 0,
              $sformatf("avg net %0d / %0d = %0d", stats[n].sum_net_lat, stats[n].pkts_recv, d));
        check(lat == 34, $sformatf("average read latency %0d", lat));
        rd(b + 'h1C, d, resp, lat);
        check(d == ((stats[n].pkts_recv == 0) ? 0 : stats[n].sum_queue_lat / stats[n].pkts_recv),
              "avg queue");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
