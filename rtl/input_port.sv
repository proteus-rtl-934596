// input_port: one router input with its virtual-channel buffers.
//
// A flit arriving on the link is written into the buffer of the VC named in
// its vc field (the sender chose that VC). Each VC remembers, for the packet
// at its head, the output port and the downstream VC it was given: the
// head flit's route comes from the routing unit (route_in) and is stored
// when the head flit wins switch arbitration, together with the downstream
// VC id handed out by the switch arbiter; body and tail flits reuse them.
// The VC multiplexer puts the granted VC's flit on out_flit, with its vc
// field rewritten to the downstream VC. For every flit that leaves, a credit
// naming the VC goes back to the upstream router in the same cycle; it is
// marked vc_free when the flit is a tail.
//
// Buffers, VC multiplexer and credit return follow the document; storing
// route and VC per packet is this design's way of keeping a packet's flits
// together (wormhole with atomic VC allocation).
//
// Timing: a flit written in cycle t can request the switch in cycle t+1.
// grant/grant_vc/grant_out_vc come combinationally from the switch
// arbiter and pop the buffer at the next edge.
module input_port
  import noc_pkg::*;
#(
  parameter int NUM_VCS   = 4,
  parameter int BUF_DEPTH = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // link from upstream
  input  flit_t                  in_flit,
  output credit_t                credit_out,
  // per-VC state seen by the routing unit and the switch arbiter
  output logic  [NUM_VCS-1:0]    vc_valid,
  output flit_t                  vc_flit   [NUM_VCS],
  input  port_e                  route_in  [NUM_VCS],  // from routing unit (head flits)
  output port_e                  vc_route  [NUM_VCS],
  output logic  [VC_W-1:0]       vc_out_vc [NUM_VCS],  // allocated downstream VC (body/tail)
  // switch grant
  input  logic                   grant,
  input  logic  [VC_W-1:0]       grant_vc,
  input  logic  [VC_W-1:0]       grant_out_vc,         // downstream VC for a granted head
  output flit_t                  out_flit,
  // occupancy for the deadlock detector
  output logic  [NUM_VCS-1:0]    vc_pop
);
  localparam int FW = $bits(flit_t);

  port_e           route_r  [NUM_VCS];
  logic [VC_W-1:0] outvc_r  [NUM_VCS];

  for (genvar v = 0; v < NUM_VCS; v++) begin : g_vc
    logic empty, full;
    logic [$clog2(BUF_DEPTH+1)-1:0] count;
    logic [FW-1:0] rd_data;
    logic wr;
    assign wr        = in_flit.valid && (int'(in_flit.vc) == v);
    assign vc_pop[v] = grant && (int'(grant_vc) == v);

    sync_fifo #(.WIDTH(FW), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en(wr), .wr_data(FW'(in_flit)),
      .rd_en(vc_pop[v]), .rd_data(rd_data),
      .empty(empty), .full(full), .count(count)
    );

    assign vc_valid[v]  = !empty;
    assign vc_flit[v]   = flit_t'(rd_data);
    assign vc_route[v]  = vc_flit[v].head ? route_in[v] : route_r[v];
    assign vc_out_vc[v] = outvc_r[v];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        route_r[v] <= P_LOCAL;
        outvc_r[v] <= '0;
      end else if (vc_pop[v] && vc_flit[v].head) begin
        route_r[v] <= route_in[v];
        outvc_r[v] <= grant_out_vc;
      end
    end

    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr && full));
  end

  // VC multiplexer
  always_comb begin
    out_flit = FLIT_IDLE;
    for (int v = 0; v < NUM_VCS; v++)
      if (vc_pop[v]) begin
        out_flit    = vc_flit[v];
        out_flit.vc = vc_flit[v].head ? grant_out_vc : outvc_r[v];
      end
    out_flit.valid = grant;
  end

  always_comb begin
    credit_out         = CREDIT_IDLE;
    credit_out.valid   = grant;
    credit_out.vc      = grant_vc;
    credit_out.vc_free = grant && out_flit.tail;
  end

  a_vc_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                  in_flit.valid |-> (int'(in_flit.vc) < NUM_VCS));
  a_grant_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                  grant |-> vc_valid[grant_vc]);
endmodule
