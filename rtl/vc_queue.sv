// vc_queue: free-VC queue and credit counters for one output link.
//
// The sender side of a link keeps track of the receiver's virtual channels.
// Idle VC ids wait in a queue; a head flit that wins switch arbitration
// takes the id at the head of the queue (pop) and its packet keeps that VC
// until the tail. A credit counter per VC counts the free flit slots of the
// receiver's buffer: it drops by one for each flit sent on that VC (consume)
// and rises by one for each returned credit. A credit marked vc_free (sent
// when the receiver forwarded a tail flit) puts the VC id back at the tail
// of the queue. At reset every VC is idle, queued in order 0..NUM_VCS-1,
// with BUF_DEPTH credits.
//
// The queue and its use by the switch arbiter follow the document; the
// per-VC credit counters and the vc_free mark are this design's way of
// telling the sender when a VC is free again.
//
// Timing: pop, consume and credit_in take effect at the next clock edge; a
// credit returned in cycle t can be used from cycle t+1.
module vc_queue
  import noc_pkg::*;
#(
  parameter int NUM_VCS   = 4,
  parameter int BUF_DEPTH = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation
  output logic                free_avail,   // a VC id is waiting in the queue
  output logic [VC_W-1:0]     free_vc,      // id at the head of the queue
  input  logic                pop,
  // flit sent on consume_vc
  input  logic                consume,
  input  logic [VC_W-1:0]     consume_vc,
  output logic [NUM_VCS-1:0]  credit_avail, // per VC: at least one free slot
  // credit from the receiver
  input  credit_t             credit_in
);
  localparam int QW = (NUM_VCS > 1) ? $clog2(NUM_VCS) : 1;
  localparam int CW = $clog2(BUF_DEPTH + 1);

  logic [VC_W-1:0]         q [NUM_VCS];
  logic [QW-1:0]           head, tail;
  logic [$clog2(NUM_VCS+1)-1:0] cnt;
  logic [CW-1:0]           credits [NUM_VCS];

  function automatic logic [QW-1:0] nxt(input logic [QW-1:0] p);
    return (int'(p) == NUM_VCS - 1) ? '0 : p + 1'b1;
  endfunction

  assign free_avail = (cnt != 0);
  assign free_vc    = q[head];

  always_comb
    for (int v = 0; v < NUM_VCS; v++) credit_avail[v] = (credits[v] != 0);

  logic push;
  assign push = credit_in.valid && credit_in.vc_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VCS; v++) begin
        q[v]       <= VC_W'(v);
        credits[v] <= CW'(BUF_DEPTH);
      end
      head <= '0;
      tail <= '0;
      cnt  <= ($clog2(NUM_VCS+1))'(NUM_VCS);
    end else begin
      if (push) begin
        q[tail] <= credit_in.vc;
        tail    <= nxt(tail);
      end
      if (pop) head <= nxt(head);
      if (push && !pop)      cnt <= cnt + 1'b1;
      else if (!push && pop) cnt <= cnt - 1'b1;
      for (int v = 0; v < NUM_VCS; v++) begin
        logic inc, dec;
        inc = credit_in.valid && (int'(credit_in.vc) == v);
        dec = consume && (int'(consume_vc) == v);
        if (inc && !dec)      credits[v] <= credits[v] + 1'b1;
        else if (dec && !inc) credits[v] <= credits[v] - 1'b1;
      end
    end
  end

  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> free_avail);
  a_consume_credit: assert property (@(posedge clk) disable iff (!rst_n)
                                     consume |-> credit_avail[consume_vc]);
  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   credit_in.valid |-> (int'(credit_in.vc) < NUM_VCS));
endmodule
