// traffic_gen: synthetic traffic source for one node.
//
// Each cycle in which it is enabled the generator draws a 16-bit number
// from an LFSR and creates a packet when the number is below rate, so rate
// is the injection rate in packets per node per cycle times 65536. The
// destination follows the selected pattern, applied to the B = log2(NUM_NODES)
// bits of this node's id s:
//   uniform random  a second LFSR value modulo NUM_NODES (this node's own
//                   id is replaced by the next id)
//   bit-complement  ~s
//   bit-reverse     s with its bits in reverse order
//   shuffle         s rotated left by one bit
//   transpose       upper and lower halves of s swapped (x and y of a
//                   square mesh)
//   bit-rotation    s rotated right by one bit
// Bit patterns need NUM_NODES to be a power of two; otherwise the result is
// taken modulo NUM_NODES. A created packet waits in a one-entry holding
// register until the packet handler accepts it; a packet due while that
// register is still full is not created and is counted in dropped. A
// packet still held when the generator is switched off is discarded.
// Packet data carry the node id, a running sequence number and the flit
// index, so that a receiver can check them.
//
// The patterns and the LFSR-based injection follow the document; the rate
// encoding, the handling of the own id and the holding register are this
// design's choices.
module traffic_gen
  import noc_pkg::*;
#(
  parameter int NODE_ID   = 0,
  parameter int NUM_NODES = 16,
  parameter int MAX_FLITS = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [15:0]                 rate,
  input  pattern_e                    pattern,
  input  logic [$clog2(MAX_FLITS+1)-1:0] pkt_len,
  output logic                        pkt_valid,
  input  logic                        pkt_ready,
  output logic [NODE_W-1:0]           pkt_dst,
  output logic [$clog2(MAX_FLITS+1)-1:0] pkt_len_o,
  output logic [MAX_FLITS*LINK_W-1:0] pkt_data,
  output logic [31:0]                 generated,
  output logic [31:0]                 dropped
);
  localparam int B  = (NUM_NODES > 1) ? $clog2(NUM_NODES) : 1;
  localparam int LW = $clog2(MAX_FLITS + 1);

  logic [15:0] r_inj, r_dst;
  lfsr #(.WIDTH(16), .SEED(32'(NODE_ID * 7919 + 12345))) u_inj (
    .clk, .rst_n, .en(enable), .value(r_inj)
  );
  lfsr #(.WIDTH(16), .SEED(32'(NODE_ID * 104729 + 999))) u_dst (
    .clk, .rst_n, .en(enable), .value(r_dst)
  );

  function automatic logic [B-1:0] pattern_dst(input pattern_e p, input logic [B-1:0] s,
                                               input logic [15:0] r);
    logic [B-1:0] d;
    int u;
    unique case (p)
      PAT_BIT_COMP:  d = ~s;
      PAT_BIT_REV:   for (int i = 0; i < B; i++) d[i] = s[B-1-i];
      PAT_SHUFFLE:   d = (B > 1) ? {s[B-2:0], s[B-1]} : s;
      PAT_BIT_ROT:   d = (B > 1) ? {s[0], s[B-1:1]} : s;
      PAT_TRANSPOSE: d = (B > 1) ? ((s << (B - B/2)) | (s >> (B/2))) & B'((1 << B) - 1) : s;
      default: begin
        u = int'(r) % NUM_NODES;
        if (u == NODE_ID) u = (u + 1) % NUM_NODES;
        d = B'(u);
      end
    endcase
    return B'(int'(d) % NUM_NODES);
  endfunction

  logic        fire;
  logic [31:0] seq;
  assign fire = enable && (r_inj < rate);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt_valid <= 1'b0;
      pkt_dst   <= '0;
      pkt_len_o <= '0;
      pkt_data  <= '0;
      generated <= '0;
      dropped   <= '0;
      seq       <= '0;
    end else begin
      if ((pkt_valid && pkt_ready) || !enable) pkt_valid <= 1'b0;
      if (fire) begin
        if (pkt_valid && !pkt_ready) begin
          dropped <= dropped + 1'b1;
        end else begin
          pkt_valid <= 1'b1;
          pkt_dst   <= NODE_W'(pattern_dst(pattern, B'(NODE_ID), r_dst));
          pkt_len_o <= (pkt_len == 0) ? LW'(1) : pkt_len;
          for (int k = 0; k < MAX_FLITS; k++)
            pkt_data[k*LINK_W +: LINK_W] <= LINK_W'({NODE_W'(NODE_ID), seq, 6'(k)});
          seq       <= seq + 1'b1;
          generated <= generated + 1'b1;
        end
      end
    end
  end
endmodule
