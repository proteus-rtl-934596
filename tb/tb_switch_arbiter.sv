// tb_switch_arbiter: the switch arbiter fed by a model of five input ports
// with 4 VCs each, every VC holding packets of 1 to 4 flits bound for random
// outputs, and a model of five downstream routers (4 VCs of 2 slots) that
// return credits after a random delay. Checked every cycle against that
// model: at most one grant per input and per output; the crossbar select
// matches the grants; a head flit is granted only when the output has a
// free downstream VC and receives the oldest freed one; a body flit only
// when its VC has a credit; and when a single VC requests an output with
// resources available, it is granted. All packets must finish.
module tb_switch_arbiter;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NV = 4, BD = 2;

  logic [NV-1:0]   vc_valid  [NPORTS];
  logic [NV-1:0]   vc_head   [NPORTS];
  port_e           vc_route  [NPORTS][NV];
  logic [VC_W-1:0] vc_out_vc [NPORTS][NV];
  credit_t         cin [NPORTS];
  logic            grant [NPORTS];
  logic [VC_W-1:0] grant_vc [NPORTS], grant_out_vc [NPORTS];
  logic            xv [NPORTS];
  logic [2:0]      xs [NPORTS];
  logic            stall_any;

  switch_arbiter #(.NUM_VCS(NV), .BUF_DEPTH(BD)) dut (
    .clk, .rst_n, .vc_valid, .vc_head, .vc_route, .vc_out_vc, .credit_in(cin),
    .grant, .grant_vc, .grant_out_vc, .xbar_valid(xv), .xbar_sel(xs), .stall_any
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input model
  int left  [NPORTS][NV];   // flits left in current packet (0 = idle)
  int first [NPORTS][NV];   // next flit is a head
  int pk    [NPORTS][NV];   // packets still to send
  int route [NPORTS][NV];
  int ovc   [NPORTS][NV];
  // downstream model
  int freeq [NPORTS][$];
  int cred  [NPORTS][NV];
  credit_t pend [NPORTS][$];
  int pend_t [NPORTS][$];
  int cyc = 0, done_pk = 0;
  bit g_s [NPORTS];
  int gv_s [NPORTS];

  always_comb
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NV; v++) begin
        vc_valid[p][v]  = (left[p][v] > 0);
        vc_head[p][v]   = (first[p][v] != 0);
        vc_route[p][v]  = port_e'(route[p][v]);
        vc_out_vc[p][v] = VC_W'(ovc[p][v]);
      end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      cin[p] = CREDIT_IDLE;
      freeq[p] = '{0, 1, 2, 3};
      for (int v = 0; v < NV; v++) begin
        pk[p][v] = 8; left[p][v] = 0; first[p][v] = 0; route[p][v] = 0; ovc[p][v] = 0;
        cred[p][v] = BD;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  always @(negedge clk) if (rst_n) begin
    int in_g, out_g [NPORTS], req_cnt [NPORTS], req_p [NPORTS], req_v [NPORTS];
    cyc++;
    // start new packets
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NV; v++)
        if (left[p][v] == 0 && pk[p][v] > 0 && $urandom_range(3) == 0) begin
          left[p][v] = int'($urandom_range(4, 1)); first[p][v] = 1;
          route[p][v] = int'($urandom_range(4)); pk[p][v]--;
        end
    // credits returned by the downstream model
    for (int o = 0; o < NPORTS; o++) begin
      cin[o] = CREDIT_IDLE;
      if (pend[o].size() > 0 && pend_t[o][0] <= cyc) begin
        cin[o] = pend[o].pop_front(); void'(pend_t[o].pop_front());
      end
    end
    #1;
    // checks on this cycle's grants
    foreach (out_g[o]) begin out_g[o] = 0; req_cnt[o] = 0; end
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NV; v++)
        if (left[p][v] > 0) begin
          bit ok_res;
          int o;
          o = route[p][v];
          ok_res = first[p][v] ? (freeq[o].size() > 0) : (cred[o][ovc[p][v]] > 0);
          if (ok_res) begin req_cnt[o]++; req_p[o] = p; req_v[o] = v; end
        end
    for (int p = 0; p < NPORTS; p++) if (grant[p]) begin
      int v, o;
      bit ok;
      v = int'(grant_vc[p]); o = route[p][v];
      ok = (v < NV) && (left[p][v] > 0);
      if (ok && first[p][v]) ok = (freeq[o].size() > 0) && (int'(grant_out_vc[p]) == freeq[o][0]);
      else if (ok) ok = (cred[o][ovc[p][v]] > 0);
      ok &= xv[o] && (int'(xs[o]) == p);
      out_g[o]++;
      checks++;
      if (!ok) begin failures++; $display("FAIL %0t grant input %0d vc %0d out %0d", $time, p, v, o); end
    end
    for (int o = 0; o < NPORTS; o++) begin
      checks++;
      if (out_g[o] > 1 || (xv[o] && out_g[o] == 0)) begin failures++; $display("FAIL %0t output %0d granted %0d", $time, o, out_g[o]); end
      // a lone eligible requester whose input has no other eligible VC must win
      if (req_cnt[o] == 1) begin
        int others;
        others = 0;
        for (int v = 0; v < NV; v++) if (v != req_v[o] && left[req_p[o]][v] > 0) others++;
        if (others == 0) begin
          checks++;
          if (!(grant[req_p[o]] && int'(grant_vc[req_p[o]]) == req_v[o])) begin
            failures++; $display("FAIL %0t lone request out %0d not granted", $time, o);
          end
        end
      end
    end
    for (int p = 0; p < NPORTS; p++) begin g_s[p] = grant[p]; gv_s[p] = int'(grant_vc[p]); end
    @(posedge clk);
    #1;
    // advance the model with the grants of the cycle that just ended
    for (int p = 0; p < NPORTS; p++) if (g_s[p]) begin
      int v, o, dv;
      credit_t c;
      v = gv_s[p]; o = route[p][v];
      if (first[p][v]) begin dv = freeq[o].pop_front(); ovc[p][v] = dv; first[p][v] = 0; end
      else dv = ovc[p][v];
      cred[o][dv]--;
      left[p][v]--;
      c.valid = 1; c.vc = VC_W'(dv); c.vc_free = (left[p][v] == 0);
      if (left[p][v] == 0) done_pk++;
      pend[o].push_back(c); pend_t[o].push_back(cyc + int'($urandom_range(4, 1)));
    end
    for (int o = 0; o < NPORTS; o++) if (cin[o].valid) begin
      cred[o][cin[o].vc]++;
      if (cin[o].vc_free) freeq[o].push_back(int'(cin[o].vc));
    end
  end

  initial begin
    wait (rst_n);
    wait (done_pk == NPORTS * NV * 8 || cyc > 20000);
    repeat (20) @(posedge clk);
    checks++;
    if (done_pk != NPORTS * NV * 8) begin failures++; $display("FAIL only %0d packets done", done_pk); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
