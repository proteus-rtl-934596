// systolic_ring: 1D systolic convolution on a ring NoC.
//
// An 18-node ring (single-cycle routers, 4 VCs, 48-bit channels) connects
// an input memory at node 0, K = 16 multiply-accumulate cores at nodes
// 1..16 and an output memory at node 17. Core j (node j) holds coefficient
// B_j (b_coef[j-1]). The input memory streams A_1..A_len to node 1; every
// core passes each element on to the next node together with an updated
// partial sum, and the output memory collects
//   C_i = sum over j = 1..16 of A_(i+j) * B_j,   i = 0 .. len-16,
// in order. Every hop goes EAST, the shorter way round the ring.
//
// The ring, its 18 nodes, the 16 cores with stationary B, the two memories
// and the convolution follow the document; how the cores pair elements
// with partial sums (see systolic_mac) is this design's.
//
// Interface: write A with a_wr_*, set b_coef, pulse start with len (the
// number of A elements); busy falls when the last element left the input
// memory, and res_count counts the sums stored. clear resets the cores and
// the output memory between runs. The ring's own statistics are reached
// through its AXI4-Lite port.
module systolic_ring
  import noc_pkg::*;
#(
  parameter int K      = 16,   // cores
  parameter int DEPTH  = 64,   // elements of A, entries of the output memory
  parameter int A_W    = 16,
  parameter int S_W    = 32,
  parameter int ADDR_W = 20,
  localparam int NODES = K + 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [A_W-1:0]      b_coef [K],
  input  logic                       a_wr_en,
  input  logic [$clog2(DEPTH)-1:0]   a_wr_addr,
  input  logic [A_W-1:0]             a_wr_data,
  input  logic                       start,
  input  logic [$clog2(DEPTH+1)-1:0] len,
  input  logic                       clear,
  output logic                       busy,
  output logic [$clog2(DEPTH+1)-1:0] res_count,
  input  logic [$clog2(DEPTH)-1:0]   res_addr,
  output logic [S_W-1:0]             res_data,
  output logic [31:0]                macs_total,
  // AXI4-Lite slave of the ring's register block
  input  logic [ADDR_W-1:0]          s_awaddr,
  input  logic                       s_awvalid,
  output logic                       s_awready,
  input  logic [31:0]                s_wdata,
  input  logic [3:0]                 s_wstrb,
  input  logic                       s_wvalid,
  output logic                       s_wready,
  output logic [1:0]                 s_bresp,
  output logic                       s_bvalid,
  input  logic                       s_bready,
  input  logic [ADDR_W-1:0]          s_araddr,
  input  logic                       s_arvalid,
  output logic                       s_arready,
  output logic [31:0]                s_rdata,
  output logic [1:0]                 s_rresp,
  output logic                       s_rvalid,
  input  logic                       s_rready,
  output logic                       deadlock
);
  localparam int LW = 1;   // $clog2(MAX_FLITS+1) with one-flit packets

  logic                tx_valid [NODES];
  logic                tx_ready [NODES];
  logic [NODE_W-1:0]   tx_dst   [NODES];
  logic [LW-1:0]       tx_len   [NODES];
  logic [LINK_W-1:0]   tx_data  [NODES];
  logic                rx_valid [NODES];
  logic [NODE_W-1:0]   rx_src   [NODES];
  logic [LW-1:0]       rx_len   [NODES];
  logic [LINK_W-1:0]   rx_data  [NODES];
  logic [31:0]         macs     [K];
  logic                stall;

  noc_top #(
    .TOPOLOGY(TOPO_RING), .ROUTING(RT_XY), .COLS(NODES), .ROWS(1),
    .NUM_VCS(4), .BUF_DEPTH(1), .OUT_REG(1'b0), .MAX_FLITS(1), .SRC_DEPTH(4), .ADDR_W(ADDR_W)
  ) u_noc (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready,
    .s_araddr, .s_arvalid, .s_arready, .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .ext_tx_valid(tx_valid), .ext_tx_ready(tx_ready), .ext_tx_dst(tx_dst),
    .ext_tx_len(tx_len), .ext_tx_data(tx_data),
    .ext_rx_valid(rx_valid), .ext_rx_src(rx_src), .ext_rx_len(rx_len), .ext_rx_data(rx_data),
    .deadlock, .stall
  );

  for (genvar n = 0; n < NODES; n++) begin : g_len
    assign tx_len[n] = LW'(1);
  end

  vector_source #(.DEPTH(DEPTH), .A_W(A_W), .DST(1), .INTERVAL(2)) u_src (
    .clk, .rst_n, .wr_en(a_wr_en), .wr_addr(a_wr_addr), .wr_data(a_wr_data),
    .start, .len, .busy,
    .tx_valid(tx_valid[0]), .tx_ready(tx_ready[0]), .tx_dst(tx_dst[0]), .tx_data(tx_data[0])
  );

  for (genvar j = 1; j <= K; j++) begin : g_mac
    systolic_mac #(.NEXT_NODE(j + 1), .FIRST(j == 1), .A_W(A_W), .S_W(S_W), .OUT_DEPTH(8)) u_mac (
      .clk, .rst_n, .clear, .b(b_coef[j-1]),
      .rx_valid(rx_valid[j]), .rx_data(rx_data[j]),
      .tx_valid(tx_valid[j]), .tx_ready(tx_ready[j]), .tx_dst(tx_dst[j]), .tx_data(tx_data[j]),
      .macs(macs[j-1])
    );
  end

  assign tx_valid[NODES-1] = 1'b0;
  assign tx_dst[NODES-1]   = '0;
  assign tx_data[NODES-1]  = '0;

  vector_sink #(.DEPTH(DEPTH), .S_W(S_W)) u_sink (
    .clk, .rst_n, .clear, .rx_valid(rx_valid[NODES-1]), .rx_data(rx_data[NODES-1]),
    .count(res_count), .rd_addr(res_addr), .rd_data(res_data)
  );

  always_comb begin
    macs_total = '0;
    for (int j = 0; j < K; j++) macs_total += macs[j];
  end
endmodule
