// tb_bdr_route -- exhaustive check of the productive-port unit.
//
// For every router position and every destination in an 8x8 mesh, a port is
// expected productive exactly when the Manhattan distance from the neighbour
// in that direction to the destination is smaller than from the router
// itself; the ejection bit is expected exactly at the destination. Invalid
// flits must give an empty mask.
module tb_bdr_route;
  import bdr_pkg::*;

  logic [COORD_W-1:0] cx, cy;
  flit_t              f;
  logic [NPORTS:0]    prod;
  int                 checks = 0, failures = 0;

  bdr_route dut (.cur_x(cx), .cur_y(cy), .f(f), .prod(prod));

  function automatic int mdist(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction

  initial begin
    logic [NPORTS:0] exp_m;
    int nx[NPORTS], ny[NPORTS];
    for (int x = 0; x < 8; x++)
      for (int y = 0; y < 8; y++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            nx = '{x, x + 1, x, x - 1};
            ny = '{y - 1, y, y + 1, y};
            exp_m = '0;
            for (int p = 0; p < NPORTS; p++)
              exp_m[p] = mdist(nx[p], ny[p], dx, dy) < mdist(x, y, dx, dy);
            exp_m[EJECT_BIT] = (dx == x) && (dy == y);
            cx = COORD_W'(x); cy = COORD_W'(y);
            f = '0;
            f.valid = 1'b1;
            f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
            f.age = AGE_W'($urandom); f.data = $urandom;
            #1;
            checks++;
            if (prod !== exp_m) begin
              failures++;
              if (failures < 10) $display("FAIL at (%0d,%0d) dst (%0d,%0d): got %b exp %b", x, y, dx, dy, prod, exp_m);
            end
            f.valid = 1'b0;
            #1;
            checks++;
            if (prod !== '0) failures++;
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
