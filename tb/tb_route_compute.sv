// tb_route_compute: every destination from several source routers, for
// every routing rule on a 4x4 mesh, a 4x4 torus and an 8-node ring, against
// rules coded here from coordinates: the port must be LOCAL for the own id,
// a minimal (productive) direction otherwise, the forced direction where
// the rule leaves no choice, and for the ring the shorter way with ties
// going EAST. For the rules with a choice both values of rnd are tried and
// both permitted directions must be reachable.
module tb_route_compute;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  localparam int NS = 3;
  localparam int SRC [NS] = '{5, 0, 14};

  logic [NODE_W-1:0] dst;
  logic              rnd;
  port_e mesh_p [5][NS];
  port_e torus_p [NS];
  port_e ring_p [3];

  for (genvar r = 0; r < 5; r++) begin : g_r
    for (genvar s = 0; s < NS; s++) begin : g_s
      route_compute #(.TOPOLOGY(TOPO_MESH), .ROUTING(routing_e'(r)), .COLS(4), .ROWS(4), .MY_ID(SRC[s]))
        u (.dst, .rnd, .out_port(mesh_p[r][s]));
    end
  end
  for (genvar s = 0; s < NS; s++) begin : g_t
    route_compute #(.TOPOLOGY(TOPO_TORUS), .ROUTING(RT_XY), .COLS(4), .ROWS(4), .MY_ID(SRC[s]))
      u (.dst, .rnd, .out_port(torus_p[s]));
  end
  localparam int RSRC [3] = '{0, 3, 7};
  for (genvar s = 0; s < 3; s++) begin : g_ring
    route_compute #(.TOPOLOGY(TOPO_RING), .ROUTING(RT_XY), .COLS(8), .ROWS(1), .MY_ID(RSRC[s]))
      u (.dst, .rnd, .out_port(ring_p[s]));
  end

  task automatic check(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #100000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      port_e seen [2][5][NS];
      for (int rb = 0; rb < 2; rb++) begin
        dst = NODE_W'(d); rnd = rb[0];
        #1;
        for (int s = 0; s < NS; s++) begin
          int sx, sy, dx, dy;
          port_e ex, ey;
          sx = SRC[s] % 4; sy = SRC[s] / 4; dx = d % 4; dy = d / 4;
          ex = (dx > sx) ? P_EAST : P_WEST;
          ey = (dy > sy) ? P_NORTH : P_SOUTH;
          for (int r = 0; r < 5; r++) begin
            port_e p, want;
            bit ok;
            p = mesh_p[r][s];
            seen[rb][r][s] = p;
            if (d == SRC[s]) ok = (p == P_LOCAL);
            else if (dx == sx) ok = (p == ey);
            else if (dy == sy) ok = (p == ex);
            else begin
              case (r)
                0: ok = (p == ex);
                1: ok = (p == ey);
                2: ok = (dy > sy) ? (p == ex) : (p == ex || p == ey);   // north last
                3: ok = (dx < sx) ? (p == P_WEST) : (p == ex || p == ey); // west first
                default: ok = (p == ex || p == ey);
              endcase
            end
            check(ok, $sformatf("mesh rule %0d src %0d dst %0d rnd %0d got %0d", r, SRC[s], d, rb, p));
          end
          // torus, XY, shorter way with ties to EAST/NORTH
          begin
            int fx, fy;
            port_e tx, ty, want;
            fx = (dx - sx + 4) % 4; fy = (dy - sy + 4) % 4;
            tx = (fx <= 4 - fx) ? P_EAST : P_WEST;
            ty = (fy <= 4 - fy) ? P_NORTH : P_SOUTH;
            want = (d == SRC[s]) ? P_LOCAL : (dx != sx) ? tx : ty;
            check(torus_p[s] == want, $sformatf("torus src %0d dst %0d got %0d want %0d", SRC[s], d, torus_p[s], want));
          end
        end
      end
      // with two permitted directions, rnd must select either one
      for (int s = 0; s < NS; s++)
        if ((d % 4) != (SRC[s] % 4) && (d / 4) != (SRC[s] / 4)) begin
          check(seen[0][4][s] != seen[1][4][s], $sformatf("random rule ignores rnd src %0d dst %0d", SRC[s], d));
          if ((d % 4) > (SRC[s] % 4))
            check(seen[0][3][s] != seen[1][3][s], $sformatf("west-first ignores rnd src %0d dst %0d", SRC[s], d));
        end
    end
    // ring of 8
    for (int d = 0; d < 8; d++) begin
      dst = NODE_W'(d); rnd = 0;
      #1;
      for (int s = 0; s < 3; s++) begin
        int e, w;
        port_e want;
        e = (d - RSRC[s] + 8) % 8; w = (RSRC[s] - d + 8) % 8;
        want = (d == RSRC[s]) ? P_LOCAL : (w < e) ? P_WEST : P_EAST;
        check(ring_p[s] == want, $sformatf("ring src %0d dst %0d got %0d want %0d", RSRC[s], d, ring_p[s], want));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
