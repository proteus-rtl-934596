// systolic_mac: one multiply-accumulate core of the 1D systolic
// convolution that runs on a ring NoC.
//
// The core keeps one coefficient b of vector B stationary. Packets arriving
// from the previous node carry one element a of vector A in data[47:32] and
// a partial sum s in data[31:0] (one 48-bit flit). For each arriving
// packet the core sends the next node the same a together with
// s_prev + b*a, where s_prev is the partial sum carried by the packet that
// arrived before it; then it keeps the new s as s_prev. In every core but
// the first (FIRST = 0) the first packet after reset or clear only loads
// s_prev; the first core receives empty sums and answers every packet.
// With A_1, A_2, ... streamed in order and core j holding B_j, the sums
// leaving core K are, in order,
//   C_i = sum over j = 1..K of A_(i+j) * B_j,   i = 0, 1, 2, ...
// One multiply-accumulate per arriving packet, so one per cycle at most.
//
// The convolution, the stationary B, the streamed A and one MAC per cycle
// follow the document; the packet format, the pairing rule and the 8-entry
// output queue that absorbs short stalls of the network are this design's.
// The NoC gives the node's receive port no back-pressure: the stream must
// be paced so that the queue does not overflow (the queue's overflow
// assertion catches a violation).
//
// Timing: a result is queued in the cycle after its packet arrives and is
// offered on tx_* from the cycle after that.
module systolic_mac
  import noc_pkg::*;
#(
  parameter int NEXT_NODE = 1,
  parameter bit FIRST     = 1'b0,
  parameter int A_W       = 16,
  parameter int S_W       = 32,
  parameter int OUT_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic signed [A_W-1:0] b,
  // from the packet handler
  input  logic                  rx_valid,
  input  logic [LINK_W-1:0]     rx_data,
  // to the packet handler
  output logic                  tx_valid,
  input  logic                  tx_ready,
  output logic [NODE_W-1:0]     tx_dst,
  output logic [LINK_W-1:0]     tx_data,
  output logic [31:0]           macs      // multiply-accumulates done
);
  logic signed [A_W-1:0] a_in;
  logic signed [S_W-1:0] s_in, s_prev, s_out;
  logic                  primed;
  logic                  push, q_empty, q_full;
  logic [$clog2(OUT_DEPTH+1)-1:0] q_count;

  assign a_in  = rx_data[A_W+S_W-1:S_W];
  assign s_in  = rx_data[S_W-1:0];
  assign s_out = s_prev + S_W'(b * a_in);
  assign push  = rx_valid && primed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_prev <= '0;
      primed <= FIRST;
      macs   <= '0;
    end else if (clear) begin
      s_prev <= '0;
      primed <= FIRST;
      macs   <= '0;
    end else if (rx_valid) begin
      s_prev <= FIRST ? '0 : s_in;
      primed <= 1'b1;
      if (primed) macs <= macs + 1'b1;
    end
  end

  sync_fifo #(.WIDTH(LINK_W), .DEPTH(OUT_DEPTH)) u_outq (
    .clk, .rst_n,
    .wr_en(push), .wr_data({a_in, s_out}),
    .rd_en(tx_valid && tx_ready), .rd_data(tx_data),
    .empty(q_empty), .full(q_full), .count(q_count)
  );

  assign tx_valid = !q_empty;
  assign tx_dst   = NODE_W'(NEXT_NODE);

  initial assert (A_W + S_W == LINK_W) else $error("systolic_mac: a and s must fill one flit");
endmodule
