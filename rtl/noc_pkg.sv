// noc_pkg: types and constants shared by every block of the NoC.
//
// A link carries one flit per cycle plus a credit travelling the other way.
// The flit holds LINK_W data bits (the channel width; 48 bits in the main
// configuration) and, beside them, the routing and bookkeeping fields a
// network of this kind needs: head/tail marks, the VC the flit occupies in
// the receiving router, source and destination node ids and two
// timestamps used for latency statistics. Carrying these fields as sideband
// next to the data, rather than inside the data bits, is a choice of this
// design. Node ids are 10 bits so that up to 1024 nodes can be addressed;
// VC ids are 4 bits so that up to 16 VCs per port can be used.
package noc_pkg;

  localparam int LINK_W   = 48;   // channel (flit data) width
  localparam int NODE_W   = 10;   // node id width, up to 1024 nodes
  localparam int VC_W     = 4;    // VC id width, up to 16 VCs
  localparam int TS_W     = 16;   // timestamp width (wraps; differences are modulo 2^16)
  localparam int NPORTS   = 5;    // router ports

  // Router port numbering. The document's ring listing uses LOCAL, EAST and WEST.
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,
    P_WEST  = 3'd2,
    P_NORTH = 3'd3,
    P_SOUTH = 3'd4
  } port_e;

  typedef enum logic [1:0] {
    TOPO_RING  = 2'd0,
    TOPO_MESH  = 2'd1,
    TOPO_TORUS = 2'd2
  } topology_e;

  typedef enum logic [2:0] {
    RT_XY          = 3'd0,
    RT_YX          = 3'd1,
    RT_NORTH_LAST  = 3'd2,
    RT_WEST_FIRST  = 3'd3,
    RT_RANDOM      = 3'd4
  } routing_e;

  typedef enum logic [2:0] {
    PAT_RANDOM     = 3'd0,
    PAT_BIT_COMP   = 3'd1,
    PAT_BIT_REV    = 3'd2,
    PAT_SHUFFLE    = 3'd3,
    PAT_TRANSPOSE  = 3'd4,
    PAT_BIT_ROT    = 3'd5
  } pattern_e;

  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    logic [VC_W-1:0]   vc;
    logic [NODE_W-1:0] src;
    logic [NODE_W-1:0] dst;
    logic [TS_W-1:0]   t_create;   // cycle the packet was created
    logic [TS_W-1:0]   t_inject;   // cycle its head flit entered the network
    logic [LINK_W-1:0] data;
  } flit_t;

  // Credit returned to the upstream router when a flit leaves a VC buffer.
  // vc_free is set when that flit was a tail: the VC is then idle again.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
    logic            vc_free;
  } credit_t;

  // Statistics of one node as seen by the register interface.
  typedef struct packed {
    logic [31:0] pkts_sent;
    logic [31:0] pkts_recv;
    logic [31:0] flits_recv;
    logic [31:0] sum_net_lat;
    logic [31:0] sum_queue_lat;
    logic [31:0] max_net_lat;
    logic [31:0] generated;
    logic [31:0] dropped;
    logic        deadlock;
  } node_stats_t;

  localparam flit_t   FLIT_IDLE   = '0;
  localparam credit_t CREDIT_IDLE = '0;

endpackage
