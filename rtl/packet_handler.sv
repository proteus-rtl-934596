// packet_handler: the network interface between one node and its router.
//
// Injection: packets come from the node (or the traffic generator) through
// a valid/ready port and wait in a source queue of SRC_DEPTH entries; the
// cycle a packet enters the queue is its creation time. The packet at the
// front is cut into len flits of LINK_W bits (flit k carries data bits
// k*LINK_W and up). The handler acts as the upstream side of the router's
// LOCAL input port: it takes a free VC from its own VC queue for the head
// flit and sends one flit per cycle while that VC has credits. The head's
// injection time is stamped into every flit of the packet.
//
// Ejection: every flit arriving from the router's LOCAL output is taken at
// once; its credit goes back one cycle later (marked vc_free on a tail).
// Flits are gathered per VC, and when a tail arrives the whole packet is
// presented on rx_* for one cycle (there is no back-pressure towards the
// node) together with its network latency (arrival minus injection) and
// queuing latency (injection minus creation) for the statistics.
//
// Splitting packets by channel width and helping statistics follow the
// document; queue depth, the valid/ready node port, the per-VC reassembly
// and the latency definitions are this design's choices.
module packet_handler
  import noc_pkg::*;
#(
  parameter int NODE_ID   = 0,
  parameter int NUM_VCS   = 4,
  parameter int BUF_DEPTH = 1,   // depth of the router's LOCAL input buffers
  parameter int MAX_FLITS = 4,   // longest packet, in flits
  parameter int SRC_DEPTH = 4    // source queue entries
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [TS_W-1:0]             now,
  // from the node
  input  logic                        tx_valid,
  output logic                        tx_ready,
  input  logic [NODE_W-1:0]           tx_dst,
  input  logic [$clog2(MAX_FLITS+1)-1:0] tx_len,   // flits, 1..MAX_FLITS
  input  logic [MAX_FLITS*LINK_W-1:0] tx_data,
  // to the node
  output logic                        rx_valid,
  output logic [NODE_W-1:0]           rx_src,
  output logic [$clog2(MAX_FLITS+1)-1:0] rx_len,
  output logic [MAX_FLITS*LINK_W-1:0] rx_data,
  output logic [TS_W-1:0]             rx_net_lat,
  output logic [TS_W-1:0]             rx_queue_lat,
  output logic                        inj_head,    // a head flit entered the network
  // router LOCAL port
  output flit_t                       to_router,
  input  credit_t                     credit_from_router,
  input  flit_t                       from_router,
  output credit_t                     credit_to_router
);
  localparam int LW = $clog2(MAX_FLITS + 1);
  localparam int FC = (MAX_FLITS > 1) ? $clog2(MAX_FLITS) : 1;

  typedef struct packed {
    logic [NODE_W-1:0]           dst;
    logic [LW-1:0]               len;
    logic [TS_W-1:0]             t_create;
    logic [MAX_FLITS*LINK_W-1:0] data;
  } pkt_t;

  // ---------------- source queue ----------------
  pkt_t q_in, q_head;
  logic q_empty, q_full, q_pop;
  logic [$clog2(SRC_DEPTH+1)-1:0] q_count;

  assign tx_ready = !q_full;
  always_comb begin
    q_in.dst      = tx_dst;
    q_in.len      = (tx_len == 0) ? LW'(1) : (int'(tx_len) > MAX_FLITS ? LW'(MAX_FLITS) : tx_len);
    q_in.t_create = now;
    q_in.data     = tx_data;
  end

  sync_fifo #(.WIDTH($bits(pkt_t)), .DEPTH(SRC_DEPTH)) u_srcq (
    .clk, .rst_n,
    .wr_en(tx_valid && tx_ready), .wr_data(q_in),
    .rd_en(q_pop), .rd_data(q_head),
    .empty(q_empty), .full(q_full), .count(q_count)
  );

  // ---------------- injection ----------------
  logic              free_avail;
  logic [VC_W-1:0]   free_vc;
  logic [NUM_VCS-1:0] credit_avail;
  logic              busy;        // a packet is being sent
  logic [FC-1:0]     fidx;        // next flit index
  logic [VC_W-1:0]   cur_vc;
  logic [TS_W-1:0]   cur_inject;
  logic              send, send_head, send_tail;

  assign send_head = !busy && !q_empty && free_avail;
  assign send      = send_head || (busy && credit_avail[cur_vc[$clog2(NUM_VCS > 1 ? NUM_VCS : 2)-1:0]]);
  assign send_tail = send && ((send_head ? 0 : int'(fidx)) == int'(q_head.len) - 1);
  assign q_pop     = send_tail;
  assign inj_head  = send_head;

  always_comb begin
    to_router          = FLIT_IDLE;
    to_router.valid    = send;
    to_router.head     = send_head;
    to_router.tail     = send_tail;
    to_router.vc       = send_head ? free_vc : cur_vc;
    to_router.src      = NODE_W'(NODE_ID);
    to_router.dst      = q_head.dst;
    to_router.t_create = q_head.t_create;
    to_router.t_inject = send_head ? now : cur_inject;
    to_router.data     = q_head.data[(send_head ? 0 : int'(fidx)) * LINK_W +: LINK_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      fidx       <= '0;
      cur_vc     <= '0;
      cur_inject <= '0;
    end else if (send) begin
      if (send_tail) begin
        busy <= 1'b0;
        fidx <= '0;
      end else begin
        busy <= 1'b1;
        fidx <= send_head ? FC'(1) : fidx + 1'b1;
      end
      if (send_head) begin
        cur_vc     <= free_vc;
        cur_inject <= now;
      end
    end
  end

  vc_queue #(.NUM_VCS(NUM_VCS), .BUF_DEPTH(BUF_DEPTH)) u_vcq (
    .clk, .rst_n,
    .free_avail, .free_vc, .pop(send_head),
    .consume(send), .consume_vc(to_router.vc), .credit_avail,
    .credit_in(credit_from_router)
  );

  // ---------------- ejection ----------------
  logic [MAX_FLITS*LINK_W-1:0] asm_data [NUM_VCS];
  logic [FC-1:0]               asm_cnt  [NUM_VCS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        asm_data[v] <= '0;
        asm_cnt[v]  <= '0;
      end
      credit_to_router <= CREDIT_IDLE;
      rx_valid         <= 1'b0;
      rx_src           <= '0;
      rx_len           <= '0;
      rx_data          <= '0;
      rx_net_lat       <= '0;
      rx_queue_lat     <= '0;
    end else begin
      credit_to_router.valid   <= from_router.valid;
      credit_to_router.vc      <= from_router.vc;
      credit_to_router.vc_free <= from_router.valid && from_router.tail;
      rx_valid <= 1'b0;
      if (from_router.valid) begin
        for (int v = 0; v < NUM_VCS; v++)
          if (int'(from_router.vc) == v) begin
            logic [FC-1:0] k;
            logic [MAX_FLITS*LINK_W-1:0] d;
            k = from_router.head ? '0 : asm_cnt[v];
            d = from_router.head ? '0 : asm_data[v];
            d[int'(k) * LINK_W +: LINK_W] = from_router.data;
            if (from_router.tail) begin
              asm_cnt[v]   <= '0;
              asm_data[v]  <= '0;
              rx_valid     <= 1'b1;
              rx_src       <= from_router.src;
              rx_len       <= LW'(int'(k) + 1);
              rx_data      <= d;
              rx_net_lat   <= now - from_router.t_inject;
              rx_queue_lat <= from_router.t_inject - from_router.t_create;
            end else begin
              asm_cnt[v]  <= k + 1'b1;
              asm_data[v] <= d;
            end
          end
      end
    end
  end

  a_tail_bound: assert property (@(posedge clk) disable iff (!rst_n)
                                 (from_router.valid && !from_router.tail) |->
                                 (from_router.head || int'(asm_cnt[from_router.vc]) < MAX_FLITS - 1));
  a_dst_here: assert property (@(posedge clk) disable iff (!rst_n)
                               from_router.valid |-> (int'(from_router.dst) == NODE_ID));
endmodule
