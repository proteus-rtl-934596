// tb_input_port: an input port with 4 VCs of 2 flits. Packets of 1 to 3
// flits are written into random VCs (respecting the buffer space) and
// granted in random order. Checks: vc_valid and the head flit of every VC
// follow a per-VC queue model; a head flit's route is the routing unit's
// answer, a body flit's the route stored from its head; out_flit is the
// granted VC's flit with vc set to grant_out_vc for a head and to the VC
// stored from the head for the rest; credit_out names the granted VC, in
// the same cycle, with vc_free on tails only.
module tb_input_port;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NV = 4, BD = 2;

  flit_t   in_f, out_f;
  credit_t cout;
  logic [NV-1:0] vc_valid, vc_pop;
  flit_t vc_flit [NV];
  port_e route_in [NV], vc_route [NV];
  logic [VC_W-1:0] vc_out_vc [NV];
  logic grant;
  logic [VC_W-1:0] grant_vc, grant_out_vc;

  input_port #(.NUM_VCS(NV), .BUF_DEPTH(BD)) dut (
    .clk, .rst_n, .in_flit(in_f), .credit_out(cout), .vc_valid, .vc_flit, .route_in,
    .vc_route, .vc_out_vc, .grant, .grant_vc, .grant_out_vc, .out_flit(out_f), .vc_pop
  );

  // routing unit stand-in: route = dst mod 5
  always_comb for (int v = 0; v < NV; v++) route_in[v] = port_e'(int'(vc_flit[v].dst) % 5);

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %0t %s", $time, s); end
  endtask

  flit_t q [NV][$];
  int    left_w [NV];    // flits of the packet being written
  int    st_route [NV], st_ovc [NV];
  int    seq = 0, grants = 0;

  initial begin
    in_f = FLIT_IDLE; grant = 0; grant_vc = 0; grant_out_vc = 0;
    foreach (left_w[v]) begin left_w[v] = 0; st_route[v] = 0; st_ovc[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int wv, gv;
      @(negedge clk);
      // model comparison
      for (int v = 0; v < NV; v++) begin
        check(vc_valid[v] == (q[v].size() > 0), $sformatf("vc_valid %0d", v));
        if (q[v].size() > 0) begin
          check(vc_flit[v] == q[v][0], $sformatf("head flit vc %0d", v));
          check(int'(vc_route[v]) == (q[v][0].head ? int'(q[v][0].dst) % 5 : st_route[v]),
                $sformatf("route vc %0d", v));
        end
      end
      // write a flit into a random VC with space
      in_f = FLIT_IDLE;
      wv = int'($urandom_range(NV - 1));
      if (q[wv].size() < BD && $urandom_range(1) == 1) begin
        in_f.valid = 1; in_f.vc = VC_W'(wv);
        in_f.head = (left_w[wv] == 0);
        if (left_w[wv] == 0) left_w[wv] = int'($urandom_range(3, 1));
        in_f.tail = (left_w[wv] == 1);
        left_w[wv]--;
        in_f.dst = NODE_W'($urandom_range(15)); in_f.src = NODE_W'(wv);
        in_f.data = LINK_W'(seq++);
      end
      // grant a random non-empty VC, if it would be legal
      grant = 0;
      gv = int'($urandom_range(NV - 1));
      if (q[gv].size() > 0 && $urandom_range(2) != 0) begin
        grant = 1; grant_vc = VC_W'(gv); grant_out_vc = VC_W'($urandom_range(NV - 1));
      end
      #1;
      if (grant) begin
        flit_t e;
        e = q[gv][0];
        e.vc = e.head ? grant_out_vc : VC_W'(st_ovc[gv]);
        check(out_f == e, $sformatf("out_flit from vc %0d", gv));
        check(cout.valid && int'(cout.vc) == gv && cout.vc_free == e.tail, "credit");
        grants++;
      end else begin
        check(!out_f.valid && !cout.valid, "idle output");
      end
      @(posedge clk);
      #1;
      if (grant) begin
        if (q[gv][0].head) begin st_route[gv] = int'(q[gv][0].dst) % 5; st_ovc[gv] = int'(grant_out_vc); end
        void'(q[gv].pop_front());
      end
      if (in_f.valid) q[wv].push_back(in_f);
    end
    check(grants > 500, "too few grants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
