// latency_stats: traffic statistics of one node.
//
// Counts the packets this node injected (inj_head) and received
// (rx_valid), the flits it received, and accumulates the network traversal
// latency and the queuing latency of each received packet, as reported by
// the packet handler; it also keeps the largest network latency seen. The
// averages are the sums divided by the received-packet count, which the
// register interface computes when they are read. clear zeroes everything
// (for example after a warm-up period). Counters wrap at 2^32.
// Which metrics exist follows the document; widths and the clear are this
// design's.
//
// Timing: an event in cycle t is counted at the edge ending cycle t.
module latency_stats
  import noc_pkg::*;
#(
  parameter int LEN_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             inj_head,
  input  logic             rx_valid,
  input  logic [LEN_W-1:0] rx_len,
  input  logic [TS_W-1:0]  rx_net_lat,
  input  logic [TS_W-1:0]  rx_queue_lat,
  output logic [31:0]      pkts_sent,
  output logic [31:0]      pkts_recv,
  output logic [31:0]      flits_recv,
  output logic [31:0]      sum_net_lat,
  output logic [31:0]      sum_queue_lat,
  output logic [31:0]      max_net_lat
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkts_sent     <= '0;
      pkts_recv     <= '0;
      flits_recv    <= '0;
      sum_net_lat   <= '0;
      sum_queue_lat <= '0;
      max_net_lat   <= '0;
    end else if (clear) begin
      pkts_sent     <= '0;
      pkts_recv     <= '0;
      flits_recv    <= '0;
      sum_net_lat   <= '0;
      sum_queue_lat <= '0;
      max_net_lat   <= '0;
    end else begin
      if (inj_head) pkts_sent <= pkts_sent + 1'b1;
      if (rx_valid) begin
        pkts_recv     <= pkts_recv + 1'b1;
        flits_recv    <= flits_recv + 32'(rx_len);
        sum_net_lat   <= sum_net_lat + 32'(rx_net_lat);
        sum_queue_lat <= sum_queue_lat + 32'(rx_queue_lat);
        if (32'(rx_net_lat) > max_net_lat) max_net_lat <= 32'(rx_net_lat);
      end
    end
  end
endmodule
