// tb_xy_route: exhaustive check of the XY routing logic.
//
// For every router position and destination in a 4x4 mesh, the expected port
// is worked out from the coordinate differences (columns first, then rows).
// The test also walks each source-destination pair hop by hop through the
// routing function and checks that the packet arrives after exactly the
// Manhattan distance in hops, i.e. on a shortest path.
module tb_xy_route;
  import noc_pkg::*;
  logic [COORD_W-1:0] cx, cy, dx, dy;
  port_e op;
  int checks = 0, failures = 0;

  xy_route dut (.cur_x(cx), .cur_y(cy), .dst_x(dx), .dst_y(dy), .out_port(op));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s cur=(%0d,%0d) dst=(%0d,%0d) port=%0d", what, cx, cy, dx, dy, op);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e e;
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++)
        for (int tx = 0; tx < 4; tx++)
          for (int ty = 0; ty < 4; ty++) begin
            int hops, px, py, manhattan;
            cx = COORD_W'(x); cy = COORD_W'(y); dx = COORD_W'(tx); dy = COORD_W'(ty);
            #1;
            if (tx > x)      e = PORT_EAST;
            else if (tx < x) e = PORT_WEST;
            else if (ty > y) e = PORT_SOUTH;
            else if (ty < y) e = PORT_NORTH;
            else             e = PORT_LOCAL;
            check(op == e, "port");
            // Walk the route.
            px = x; py = y; hops = 0;
            cx = COORD_W'(px); cy = COORD_W'(py); #1;
            while (op != PORT_LOCAL && hops < 16) begin
              case (op)
                PORT_EAST:  px++;
                PORT_WEST:  px--;
                PORT_SOUTH: py++;
                PORT_NORTH: py--;
                default: ;
              endcase
              hops++;
              cx = COORD_W'(px); cy = COORD_W'(py); #1;
            end
            manhattan = (tx > x ? tx - x : x - tx) + (ty > y ? ty - y : y - ty);
            check(px == tx && py == ty && hops == manhattan, "shortest path");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
