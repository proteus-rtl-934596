// proteus_top: everything in this repository in one module.
//
// Two independent systems stand side by side, each with its own ports:
//  * mesh_*: the NoC in its main configuration (noc_top with its defaults:
//    4x4 mesh, single-cycle routers, 4 VCs per port, 48-bit channels, XY
//    routing), with per-node external packet ports, traffic generators,
//    statistics and an AXI4-Lite register port;
//  * sys_*:  the 1D systolic convolution on an 18-node ring (systolic_ring),
//    16 multiply-accumulate cores between an input and an output memory.
// The two share only clock and reset. See noc_top and systolic_ring for
// the behaviour and timing of each port group.
module proteus_top
  import noc_pkg::*;
#(
  parameter int ADDR_W    = 20,
  parameter int MAX_FLITS = 4,
  parameter int SYS_K     = 16,
  parameter int SYS_DEPTH = 64,
  localparam int NODES    = 16,
  localparam int LW       = $clog2(MAX_FLITS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // ---------------- NoC, main configuration ----------------
  input  logic [ADDR_W-1:0] mesh_s_awaddr,
  input  logic mesh_s_awvalid,
  input  logic [32-1:0] mesh_s_wdata,
  input  logic [4-1:0] mesh_s_wstrb,
  input  logic mesh_s_wvalid,
  input  logic mesh_s_bready,
  input  logic [ADDR_W-1:0] mesh_s_araddr,
  input  logic mesh_s_arvalid,
  input  logic mesh_s_rready,
  output logic mesh_s_awready,
  output logic mesh_s_wready,
  output logic [2-1:0] mesh_s_bresp,
  output logic mesh_s_bvalid,
  output logic mesh_s_arready,
  output logic [32-1:0] mesh_s_rdata,
  output logic [2-1:0] mesh_s_rresp,
  output logic mesh_s_rvalid,
  input  logic                        mesh_tx_valid [NODES],
  output logic                        mesh_tx_ready [NODES],
  input  logic [NODE_W-1:0]           mesh_tx_dst   [NODES],
  input  logic [LW-1:0]               mesh_tx_len   [NODES],
  input  logic [MAX_FLITS*LINK_W-1:0] mesh_tx_data  [NODES],
  output logic                        mesh_rx_valid [NODES],
  output logic [NODE_W-1:0]           mesh_rx_src   [NODES],
  output logic [LW-1:0]               mesh_rx_len   [NODES],
  output logic [MAX_FLITS*LINK_W-1:0] mesh_rx_data  [NODES],
  output logic                        mesh_deadlock,
  output logic                        mesh_stall,
  // ---------------- systolic convolution on a ring ----------------
  input  logic signed [15:0]          sys_b_coef [SYS_K],
  input  logic                        sys_a_wr_en,
  input  logic [$clog2(SYS_DEPTH)-1:0] sys_a_wr_addr,
  input  logic [15:0]                 sys_a_wr_data,
  input  logic                        sys_start,
  input  logic [$clog2(SYS_DEPTH+1)-1:0] sys_len,
  input  logic                        sys_clear,
  output logic                        sys_busy,
  output logic [$clog2(SYS_DEPTH+1)-1:0] sys_res_count,
  input  logic [$clog2(SYS_DEPTH)-1:0] sys_res_addr,
  output logic [31:0]                 sys_res_data,
  output logic [31:0]                 sys_macs_total,
  input  logic [ADDR_W-1:0] sys_s_awaddr,
  input  logic sys_s_awvalid,
  input  logic [32-1:0] sys_s_wdata,
  input  logic [4-1:0] sys_s_wstrb,
  input  logic sys_s_wvalid,
  input  logic sys_s_bready,
  input  logic [ADDR_W-1:0] sys_s_araddr,
  input  logic sys_s_arvalid,
  input  logic sys_s_rready,
  output logic sys_s_awready,
  output logic sys_s_wready,
  output logic [2-1:0] sys_s_bresp,
  output logic sys_s_bvalid,
  output logic sys_s_arready,
  output logic [32-1:0] sys_s_rdata,
  output logic [2-1:0] sys_s_rresp,
  output logic sys_s_rvalid,
  output logic                        sys_deadlock
);
  noc_top #(.ADDR_W(ADDR_W), .MAX_FLITS(MAX_FLITS)) u_mesh (
    .clk, .rst_n,
    .s_awaddr(mesh_s_awaddr), .s_awvalid(mesh_s_awvalid), .s_wdata(mesh_s_wdata), .s_wstrb(mesh_s_wstrb), .s_wvalid(mesh_s_wvalid), .s_bready(mesh_s_bready), .s_araddr(mesh_s_araddr), .s_arvalid(mesh_s_arvalid), .s_rready(mesh_s_rready), .s_awready(mesh_s_awready), .s_wready(mesh_s_wready), .s_bresp(mesh_s_bresp), .s_bvalid(mesh_s_bvalid), .s_arready(mesh_s_arready), .s_rdata(mesh_s_rdata), .s_rresp(mesh_s_rresp), .s_rvalid(mesh_s_rvalid),
    .ext_tx_valid(mesh_tx_valid), .ext_tx_ready(mesh_tx_ready), .ext_tx_dst(mesh_tx_dst),
    .ext_tx_len(mesh_tx_len), .ext_tx_data(mesh_tx_data),
    .ext_rx_valid(mesh_rx_valid), .ext_rx_src(mesh_rx_src), .ext_rx_len(mesh_rx_len),
    .ext_rx_data(mesh_rx_data), .deadlock(mesh_deadlock), .stall(mesh_stall)
  );

  systolic_ring #(.K(SYS_K), .DEPTH(SYS_DEPTH), .A_W(16), .S_W(32), .ADDR_W(ADDR_W)) u_sys (
    .clk, .rst_n,
    .b_coef(sys_b_coef), .a_wr_en(sys_a_wr_en), .a_wr_addr(sys_a_wr_addr), .a_wr_data(sys_a_wr_data),
    .start(sys_start), .len(sys_len), .clear(sys_clear), .busy(sys_busy),
    .res_count(sys_res_count), .res_addr(sys_res_addr), .res_data(sys_res_data),
    .macs_total(sys_macs_total),
    .s_awaddr(sys_s_awaddr), .s_awvalid(sys_s_awvalid), .s_wdata(sys_s_wdata), .s_wstrb(sys_s_wstrb), .s_wvalid(sys_s_wvalid), .s_bready(sys_s_bready), .s_araddr(sys_s_araddr), .s_arvalid(sys_s_arvalid), .s_rready(sys_s_rready), .s_awready(sys_s_awready), .s_wready(sys_s_wready), .s_bresp(sys_s_bresp), .s_bvalid(sys_s_bvalid), .s_arready(sys_s_arready), .s_rdata(sys_s_rdata), .s_rresp(sys_s_rresp), .s_rvalid(sys_s_rvalid),
    .deadlock(sys_deadlock)
  );
endmodule
