// router: five-port virtual-channel router (LOCAL, EAST, WEST, NORTH, SOUTH).
//
// A flit arriving on an input link is latched into a VC buffer of that
// input port. In the next cycle the routing unit computes the output port
// of every head flit waiting at the front of a VC buffer, the switch
// arbiter picks the winners and hands each winning head flit a free
// downstream VC from the output's VC queue, and the crossbar carries the
// winners to the output ports. An output port sends the flit on in the
// same cycle (single-cycle router, OUT_REG = 0) or registers it first
// (two-cycle router, OUT_REG = 1). Credits go back upstream in the cycle a
// flit leaves its buffer. A deadlock detector watches all VC buffers and an
// LFSR supplies the random bit for adaptive and random routing.
//
// The structure follows the document's router figure; flow control is
// credit-based wormhole with a VC held by a packet from head to tail, which
// is this design's reading of the document's VC queue.
//
// Interface: in_flit/credit_out per input port, out_flit/credit_in per
// output port, indexed by port_e. Ports without a neighbour are tied idle
// outside the router. dl_threshold/dl_clear/deadlock belong to the deadlock
// detector; stall flags a cycle in which a buffered flit lacked a VC or a
// credit.
//
// Latency: one cycle per hop with OUT_REG = 0 (the cycle in the buffer),
// two with OUT_REG = 1, without contention.
module router
  import noc_pkg::*;
#(
  parameter topology_e   TOPOLOGY  = TOPO_MESH,
  parameter routing_e    ROUTING   = RT_XY,
  parameter int          COLS      = 4,
  parameter int          ROWS      = 4,
  parameter int          MY_ID     = 0,
  parameter int          NUM_VCS   = 4,
  parameter int          BUF_DEPTH = 1,
  parameter bit          OUT_REG   = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  flit_t        in_flit    [NPORTS],
  output credit_t      credit_out [NPORTS],
  output flit_t        out_flit   [NPORTS],
  input  credit_t      credit_in  [NPORTS],
  input  logic [15:0]  dl_threshold,
  input  logic         dl_clear,
  output logic         deadlock,
  output logic         stall
);
  logic [NUM_VCS-1:0] vc_valid  [NPORTS];
  logic [NUM_VCS-1:0] vc_head   [NPORTS];
  logic [NUM_VCS-1:0] vc_pop    [NPORTS];
  flit_t              vc_flit   [NPORTS][NUM_VCS];
  port_e              route_in  [NPORTS][NUM_VCS];
  port_e              vc_route  [NPORTS][NUM_VCS];
  logic [VC_W-1:0]    vc_out_vc [NPORTS][NUM_VCS];
  logic               grant        [NPORTS];
  logic [VC_W-1:0]    grant_vc     [NPORTS];
  logic [VC_W-1:0]    grant_out_vc [NPORTS];
  flit_t              sw_in  [NPORTS];
  flit_t              sw_out [NPORTS];
  logic               xbar_valid [NPORTS];
  logic [2:0]         xbar_sel   [NPORTS];
  logic [15:0]        rnd;

  lfsr #(.WIDTH(16), .SEED(32'(MY_ID * 40503 + 1))) u_lfsr (
    .clk, .rst_n, .en(1'b1), .value(rnd)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    for (genvar v = 0; v < NUM_VCS; v++) begin : g_rc
      assign vc_head[p][v] = vc_flit[p][v].head;
      route_compute #(
        .TOPOLOGY(TOPOLOGY), .ROUTING(ROUTING), .COLS(COLS), .ROWS(ROWS), .MY_ID(MY_ID)
      ) u_rc (
        .dst(vc_flit[p][v].dst), .rnd(rnd[(p * NUM_VCS + v) % 16]), .out_port(route_in[p][v])
      );
    end

    input_port #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_in (
      .clk, .rst_n,
      .in_flit(in_flit[p]), .credit_out(credit_out[p]),
      .vc_valid(vc_valid[p]), .vc_flit(vc_flit[p]), .route_in(route_in[p]),
      .vc_route(vc_route[p]), .vc_out_vc(vc_out_vc[p]),
      .grant(grant[p]), .grant_vc(grant_vc[p]), .grant_out_vc(grant_out_vc[p]),
      .out_flit(sw_in[p]), .vc_pop(vc_pop[p])
    );

    output_port #(.OUT_REG(OUT_REG)) u_out (
      .clk, .rst_n, .in_flit(sw_out[p]), .out_flit(out_flit[p])
    );
  end

  switch_arbiter #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_sa (
    .clk, .rst_n,
    .vc_valid, .vc_head, .vc_route, .vc_out_vc, .credit_in,
    .grant, .grant_vc, .grant_out_vc, .xbar_valid, .xbar_sel, .stall_any(stall)
  );

  crossbar #(.N(NPORTS)) u_xbar (
    .in_flit(sw_in), .sel_valid(xbar_valid), .sel(xbar_sel), .out_flit(sw_out)
  );

  logic [NPORTS*NUM_VCS-1:0] occ, mov;
  always_comb
    for (int p = 0; p < NPORTS; p++)
      for (int v = 0; v < NUM_VCS; v++) begin
        occ[p*NUM_VCS+v] = vc_valid[p][v];
        mov[p*NUM_VCS+v] = vc_pop[p][v];
      end

  deadlock_detector #(.NBUF(NPORTS*NUM_VCS), .CNT_W(16)) u_dl (
    .clk, .rst_n, .clear(dl_clear), .threshold(dl_threshold),
    .occupied(occ), .moved(mov), .deadlock
  );
endmodule
