// route_compute: the routing unit. Gives the output port of a flit from
// its destination node id.
//
// Nodes are numbered id = y*COLS + x. EAST is x+1, WEST x-1, NORTH y+1,
// SOUTH y-1; a flit for this node leaves through LOCAL. A ring is a
// 1-row topology whose ends are joined.
//
//  * Ring: shortest way round. When both ways are equally long the flit goes
//    EAST, as in the document's HLS routing function (its hand-written
//    listing sends such a flit WEST instead; the HLS one is followed).
//  * Mesh: the signed offset per dimension. Torus: the shorter way round in
//    each dimension, ties to EAST / NORTH.
//  * XY: correct x first, then y. YX: y first.
//  * West-First: a flit that must go west goes west first; otherwise any
//    productive direction among EAST, NORTH, SOUTH may be taken.
//  * North-Last: a flit that must go north goes north only once x is
//    correct; otherwise any productive direction among EAST, WEST, SOUTH.
//  * Random: any productive direction (random minimal oblivious routing).
// Where a rule permits two directions, bit rnd chooses between them (x when
// rnd is 0). Which of two permitted directions is taken is not given by the
// document; this design leaves it to a random bit.
//
// Purely combinational.
module route_compute
  import noc_pkg::*;
#(
  parameter topology_e TOPOLOGY = TOPO_MESH,
  parameter routing_e  ROUTING  = RT_XY,
  parameter int        COLS     = 4,
  parameter int        ROWS     = 4,
  parameter int        MY_ID    = 0
) (
  input  logic [NODE_W-1:0] dst,
  input  logic              rnd,
  output port_e             out_port
);
  localparam int MY_X = MY_ID % COLS;
  localparam int MY_Y = MY_ID / COLS;
  localparam bit WRAP = (TOPOLOGY != TOPO_MESH);

  // Direction needed in one dimension: +1, -1 or 0.
  function automatic int dir(input int me, input int d, input int n, input bit wrap);
    int fwd, bwd;
    if (d == me) return 0;
    if (!wrap) return (d > me) ? 1 : -1;
    fwd = (d - me + n) % n;   // hops going in the + direction
    bwd = (me - d + n) % n;   // hops going in the - direction
    return (fwd <= bwd) ? 1 : -1;
  endfunction

  int dx, dy;
  port_e px, py;
  logic  x_ok, y_ok;

  always_comb begin
    dx = dir(MY_X, int'(dst) % COLS, COLS, WRAP);
    dy = (TOPOLOGY == TOPO_RING) ? 0 : dir(MY_Y, int'(dst) / COLS, ROWS, WRAP);
    px = (dx > 0) ? P_EAST  : P_WEST;
    py = (dy > 0) ? P_NORTH : P_SOUTH;
    x_ok = (dx != 0);
    y_ok = (dy != 0);

    if (!x_ok && !y_ok)             out_port = P_LOCAL;
    else if (!y_ok)                 out_port = px;
    else if (!x_ok)                 out_port = py;
    else begin
      // both dimensions still to go
      unique case (ROUTING)
        RT_XY:         out_port = px;
        RT_YX:         out_port = py;
        RT_WEST_FIRST: out_port = (dx < 0) ? P_WEST : (rnd ? py : px);
        RT_NORTH_LAST: out_port = (dy > 0) ? px     : (rnd ? py : px);
        default:       out_port = rnd ? py : px;   // RT_RANDOM
      endcase
    end
  end
endmodule
