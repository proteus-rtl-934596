// noc_top: a complete network-on-chip with its network interfaces,
// synthetic traffic, statistics and host register interface.
//
// COLS x ROWS routers are joined into a mesh, a torus (mesh with
// wrap-around links) or, with ROWS = 1, a ring. Node id = y*COLS + x; the
// EAST port of node (x,y) is wired to the WEST port of (x+1,y), the NORTH
// port to the SOUTH port of (x,y+1); links leaving the edge of a mesh, and
// the NORTH/SOUTH ports of a ring, are tied idle. Each node has a packet
// handler on the router's LOCAL port, a traffic generator and a statistics
// block. The node's packet port (ext_tx_*/ext_rx_*) is served when the
// traffic generators are off; when they are on, the generators feed the
// packet handlers instead and ext_tx_ready stays low. One AXI4-Lite slave
// (see axil_regs) holds the traffic settings and every node's statistics.
// deadlock is high while any router's deadlock detector has fired.
//
// Defaults are the main configuration the document synthesises and
// evaluates: a 4x4 mesh of single-cycle routers with 4 VCs per port,
// 48-bit channels and XY routing. Buffer depth (1 flit per VC), packet
// length limit and source queue depth are this design's choices.
module noc_top
  import noc_pkg::*;
#(
  parameter topology_e TOPOLOGY  = TOPO_MESH,
  parameter routing_e  ROUTING   = RT_XY,
  parameter int        COLS      = 4,
  parameter int        ROWS      = 4,
  parameter int        NUM_VCS   = 4,
  parameter int        BUF_DEPTH = 1,
  parameter bit        OUT_REG   = 1'b0,
  parameter int        MAX_FLITS = 4,
  parameter int        SRC_DEPTH = 4,
  parameter int        ADDR_W    = 20,
  localparam int       NUM_NODES = COLS * ROWS,
  localparam int       LW        = $clog2(MAX_FLITS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]           s_awaddr,
  input  logic                        s_awvalid,
  output logic                        s_awready,
  input  logic [31:0]                 s_wdata,
  input  logic [3:0]                  s_wstrb,
  input  logic                        s_wvalid,
  output logic                        s_wready,
  output logic [1:0]                  s_bresp,
  output logic                        s_bvalid,
  input  logic                        s_bready,
  input  logic [ADDR_W-1:0]           s_araddr,
  input  logic                        s_arvalid,
  output logic                        s_arready,
  output logic [31:0]                 s_rdata,
  output logic [1:0]                  s_rresp,
  output logic                        s_rvalid,
  input  logic                        s_rready,
  // external nodes
  input  logic                        ext_tx_valid [NUM_NODES],
  output logic                        ext_tx_ready [NUM_NODES],
  input  logic [NODE_W-1:0]           ext_tx_dst   [NUM_NODES],
  input  logic [LW-1:0]               ext_tx_len   [NUM_NODES],
  input  logic [MAX_FLITS*LINK_W-1:0] ext_tx_data  [NUM_NODES],
  output logic                        ext_rx_valid [NUM_NODES],
  output logic [NODE_W-1:0]           ext_rx_src   [NUM_NODES],
  output logic [LW-1:0]               ext_rx_len   [NUM_NODES],
  output logic [MAX_FLITS*LINK_W-1:0] ext_rx_data  [NUM_NODES],
  output logic                        deadlock,
  output logic                        stall        // some router stalled a flit this cycle
);
  localparam bit WRAP = (TOPOLOGY != TOPO_MESH);

  // configuration
  logic        tg_enable, stats_clear, dl_clear;
  logic [15:0] rate, dl_threshold;
  pattern_e    pattern;
  logic [7:0]  pkt_len8;
  logic [LW-1:0] pkt_len;
  assign pkt_len = (int'(pkt_len8) > MAX_FLITS) ? LW'(MAX_FLITS) : LW'(pkt_len8);

  logic [31:0] cycles;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cycles <= '0;
    else        cycles <= cycles + 1'b1;

  flit_t   rt_in   [NUM_NODES][NPORTS];
  flit_t   rt_out  [NUM_NODES][NPORTS];
  credit_t rt_cin  [NUM_NODES][NPORTS];
  credit_t rt_cout [NUM_NODES][NPORTS];
  node_stats_t stats [NUM_NODES];
  logic [NUM_NODES-1:0] dl_node, stall_node;

  function automatic port_e opposite(input port_e p);
    unique case (p)
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      default: return P_LOCAL;
    endcase
  endfunction

  // neighbour id through port p, or -1 when there is none
  function automatic int neighbour(input int n, input port_e p);
    int x, y;
    x = n % COLS;
    y = n / COLS;
    unique case (p)
      P_EAST:  return (x < COLS - 1) ? n + 1    : (WRAP ? n - x : -1);
      P_WEST:  return (x > 0)        ? n - 1    : (WRAP ? n + COLS - 1 : -1);
      P_NORTH: return (TOPOLOGY == TOPO_RING) ? -1 :
                      (y < ROWS - 1) ? n + COLS : (WRAP ? x : -1);
      P_SOUTH: return (TOPOLOGY == TOPO_RING) ? -1 :
                      (y > 0)        ? n - COLS : (WRAP ? x + (ROWS - 1) * COLS : -1);
      default: return -1;
    endcase
  endfunction

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    // ---------------- links ----------------
    for (genvar p = 1; p < NPORTS; p++) begin : g_link
      localparam int NB = neighbour(n, port_e'(p));
      if (NB >= 0) begin : g_nb
        assign rt_in[n][p]  = rt_out[NB][opposite(port_e'(p))];
        assign rt_cin[n][p] = rt_cout[NB][opposite(port_e'(p))];
      end else begin : g_edge
        assign rt_in[n][p]  = FLIT_IDLE;
        assign rt_cin[n][p] = CREDIT_IDLE;
      end
    end

    router #(
      .TOPOLOGY(TOPOLOGY), .ROUTING(ROUTING), .COLS(COLS), .ROWS(ROWS), .MY_ID(n),
      .NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH), .OUT_REG(OUT_REG)
    ) u_router (
      .clk, .rst_n,
      .in_flit(rt_in[n]), .credit_out(rt_cout[n]),
      .out_flit(rt_out[n]), .credit_in(rt_cin[n]),
      .dl_threshold, .dl_clear, .deadlock(dl_node[n]), .stall(stall_node[n])
    );

    // ---------------- traffic source selection ----------------
    logic                        tg_valid, tg_ready;
    logic [NODE_W-1:0]           tg_dst;
    logic [LW-1:0]               tg_len;
    logic [MAX_FLITS*LINK_W-1:0] tg_data;
    logic                        ph_valid, ph_ready;
    logic [TS_W-1:0]             net_lat, queue_lat;
    logic                        inj_head, rx_valid;

    traffic_gen #(.NODE_ID(n), .NUM_NODES(NUM_NODES), .MAX_FLITS(MAX_FLITS)) u_tg (
      .clk, .rst_n, .enable(tg_enable), .rate, .pattern, .pkt_len,
      .pkt_valid(tg_valid), .pkt_ready(tg_ready), .pkt_dst(tg_dst), .pkt_len_o(tg_len),
      .pkt_data(tg_data), .generated(stats[n].generated), .dropped(stats[n].dropped)
    );

    assign ph_valid        = tg_enable ? tg_valid : ext_tx_valid[n];
    assign tg_ready        = tg_enable && ph_ready;
    assign ext_tx_ready[n] = !tg_enable && ph_ready;

    packet_handler #(
      .NODE_ID(n), .NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH),
      .MAX_FLITS(MAX_FLITS), .SRC_DEPTH(SRC_DEPTH)
    ) u_ph (
      .clk, .rst_n, .now(cycles[TS_W-1:0]),
      .tx_valid(ph_valid), .tx_ready(ph_ready),
      .tx_dst(tg_enable ? tg_dst : ext_tx_dst[n]),
      .tx_len(tg_enable ? tg_len : ext_tx_len[n]),
      .tx_data(tg_enable ? tg_data : ext_tx_data[n]),
      .rx_valid(rx_valid), .rx_src(ext_rx_src[n]), .rx_len(ext_rx_len[n]),
      .rx_data(ext_rx_data[n]), .rx_net_lat(net_lat), .rx_queue_lat(queue_lat),
      .inj_head(inj_head),
      .to_router(rt_in[n][P_LOCAL]), .credit_from_router(rt_cout[n][P_LOCAL]),
      .from_router(rt_out[n][P_LOCAL]), .credit_to_router(rt_cin[n][P_LOCAL])
    );
    assign ext_rx_valid[n] = rx_valid;

    latency_stats #(.LEN_W(LW)) u_stats (
      .clk, .rst_n, .clear(stats_clear),
      .inj_head, .rx_valid, .rx_len(ext_rx_len[n]),
      .rx_net_lat(net_lat), .rx_queue_lat(queue_lat),
      .pkts_sent(stats[n].pkts_sent), .pkts_recv(stats[n].pkts_recv),
      .flits_recv(stats[n].flits_recv), .sum_net_lat(stats[n].sum_net_lat),
      .sum_queue_lat(stats[n].sum_queue_lat), .max_net_lat(stats[n].max_net_lat)
    );
    assign stats[n].deadlock = dl_node[n];
  end

  assign deadlock = |dl_node;
  assign stall    = |stall_node;

  axil_regs #(.NUM_NODES(NUM_NODES), .ADDR_W(ADDR_W)) u_regs (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready, .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .tg_enable, .rate, .pattern, .pkt_len(pkt_len8), .dl_threshold,
    .stats_clear, .dl_clear,
    .stats, .cycles
  );
endmodule
