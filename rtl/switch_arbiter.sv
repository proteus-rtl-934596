// switch_arbiter: allocates the crossbar and the downstream VCs.
//
// Every input VC holding a flit asks for the output port its packet is
// routed to. A head flit may ask only when that output's VC queue holds a
// free downstream VC; a body or tail flit only when its packet's downstream
// VC has a credit. Arbitration runs in two matrix-arbiter stages, because the
// 5x5 crossbar carries one flit per input port per cycle: first each input
// port picks one of its requesting VCs, then each output port picks one of
// the input ports whose chosen VC wants it. A winning head flit takes the VC
// id at the head of that output's queue. Each arbiter's priority moves only
// on a grant that went through, so a VC that loses at the output stage keeps
// its rank at its input.
//
// The document gives matrix arbitration among the VCs of all ports and the
// VC queue fed by credits; splitting it into an input stage and an output
// stage is this design's choice.
//
// Timing: combinational from the VC state and the stored priorities; the
// priorities, VC queues and credit counters update at the next edge.
module switch_arbiter
  import noc_pkg::*;
#(
  parameter int NUM_VCS   = 4,
  parameter int BUF_DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // requests, per input port and VC
  input  logic [NUM_VCS-1:0] vc_valid  [NPORTS],
  input  logic [NUM_VCS-1:0] vc_head   [NPORTS],
  input  port_e              vc_route  [NPORTS][NUM_VCS],
  input  logic [VC_W-1:0]    vc_out_vc [NPORTS][NUM_VCS],
  // credits from the downstream routers, per output port
  input  credit_t            credit_in [NPORTS],
  // grants, per input port
  output logic               grant        [NPORTS],
  output logic [VC_W-1:0]    grant_vc     [NPORTS],
  output logic [VC_W-1:0]    grant_out_vc [NPORTS],
  // crossbar control, per output port
  output logic               xbar_valid [NPORTS],
  output logic [2:0]         xbar_sel   [NPORTS],
  // a flit could not move for want of a VC or credit (statistics/tests)
  output logic               stall_any
);
  logic              free_avail [NPORTS];
  logic [VC_W-1:0]   free_vc    [NPORTS];
  logic [NUM_VCS-1:0] credit_avail [NPORTS];

  // ---------------- stage 1: one VC per input port ----------------
  logic [NUM_VCS-1:0] elig   [NPORTS];
  logic [NUM_VCS-1:0] s1_gnt [NPORTS];
  logic               s1_any [NPORTS];
  port_e              s1_route [NPORTS];
  logic [VC_W-1:0]    s1_vc  [NPORTS];

  always_comb begin
    stall_any = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NUM_VCS; v++) begin
        if (vc_head[p][v])
          elig[p][v] = vc_valid[p][v] && free_avail[vc_route[p][v]];
        else
          elig[p][v] = vc_valid[p][v] && credit_avail[vc_route[p][v]][vc_out_vc[p][v]];
        if (vc_valid[p][v] && !elig[p][v]) stall_any = 1'b1;
      end
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    matrix_arbiter #(.N(NUM_VCS)) u_arb (
      .clk, .rst_n, .req(elig[p]), .update(grant[p]), .gnt(s1_gnt[p])
    );
    always_comb begin
      s1_any[p]   = |s1_gnt[p];
      s1_vc[p]    = '0;
      s1_route[p] = P_LOCAL;
      for (int v = 0; v < NUM_VCS; v++)
        if (s1_gnt[p][v]) begin
          s1_vc[p]    = VC_W'(v);
          s1_route[p] = vc_route[p][v];
        end
    end
  end

  // ---------------- stage 2: one input port per output port ----------------
  logic [NPORTS-1:0] s2_req [NPORTS];
  logic [NPORTS-1:0] s2_gnt [NPORTS];

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    always_comb
      for (int p = 0; p < NPORTS; p++)
        s2_req[o][p] = s1_any[p] && (int'(s1_route[p]) == o);

    matrix_arbiter #(.N(NPORTS)) u_arb (
      .clk, .rst_n, .req(s2_req[o]), .update(|s2_req[o]), .gnt(s2_gnt[o])
    );

    logic              head_win, any_win;
    logic [VC_W-1:0]   win_vc;
    always_comb begin
      xbar_valid[o] = |s2_gnt[o];
      xbar_sel[o]   = '0;
      head_win      = 1'b0;
      any_win       = 1'b0;
      win_vc        = '0;
      for (int p = 0; p < NPORTS; p++)
        if (s2_gnt[o][p]) begin
          xbar_sel[o] = 3'(p);
          any_win     = 1'b1;
          head_win    = vc_head[p][s1_vc[p]];
          win_vc      = head_win ? free_vc[o] : vc_out_vc[p][s1_vc[p]];
        end
    end

    vc_queue #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_vcq (
      .clk, .rst_n,
      .free_avail(free_avail[o]), .free_vc(free_vc[o]), .pop(head_win),
      .consume(any_win), .consume_vc(win_vc), .credit_avail(credit_avail[o]),
      .credit_in(credit_in[o])
    );
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      grant[p]        = s1_any[p] && s2_gnt[s1_route[p]][p];
      grant_vc[p]     = s1_vc[p];
      grant_out_vc[p] = free_vc[s1_route[p]];
    end
endmodule
