// tb_ring_harness -- drives one RING(16) router with random traffic and
// checks it against a scoreboard; see tb_bdr_ring_router for the checks.
module tb_ring_harness
  import bdr_pkg::*;
#(
  parameter int unsigned NB = 16,
  parameter int unsigned X  = 3,
  parameter int unsigned Y  = 3,
  parameter int unsigned CYCLES = 3000
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam bit [3:0] LINK_OK = {X > 0, Y < 7, X < 7, Y > 0};

  logic clk = 0, rst_n = 0;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  flit_t inj_flit, ej_flit;
  logic inj_take;
  logic [2:0] defl_cnt;
  logic [$clog2(NB/2+1)-1:0] rot_cnt;
  logic [$clog2(NB+1)-1:0] buf_cnt;

  logic [COORD_W-1:0] cur_x = COORD_W'(X), cur_y = COORD_W'(Y);

  bdr_ring_router #(.NB(NB), .MESH_X(8), .MESH_Y(8)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { flit_t f; int t_in; } ent_t;
  ent_t held[int];
  int cand_age[int];
  int n_defl = 0, n_rot = 0, n_ej = 0, n_inj = 0, n_refused = 0;
  int oldest_id, oldest_unique, oldest_since, oldest_prev;
  bit draining;
  bit full_before[NPORTS];

  function automatic int mdist(int ax, int ay, int bx, int by);
    return ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
  endfunction

  function automatic bit productive(flit_t f, int p);
    int nx[4], ny[4];
    nx = '{X, X + 1, X, X - 1};
    ny = '{Y - 1, Y, Y + 1, Y};
    return mdist(nx[p], ny[p], f.dst_x, f.dst_y) < mdist(X, Y, f.dst_x, f.dst_y);
  endfunction

  task automatic check(bit cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL ring (%0d,%0d) cycle %0d: %s", X, Y, t, what);
    end
  endtask

  task automatic check_outputs(int t);
    int nonprod, id;
    nonprod = 0;
    for (int q = 0; q <= NPORTS; q++) begin
      flit_t f;
      f = (q < NPORTS) ? out_flit[q] : ej_flit;
      if (f.valid) begin
        id = int'(f.data);
        check(held.exists(id), "unknown or duplicated flit leaves", t);
        if (held.exists(id)) begin
          int exp_age;
          exp_age = int'(held[id].f.age) + (t - 1 - held[id].t_in) + ((q < NPORTS) ? 1 : 0);
          check(int'(f.age) == exp_age, "flit age", t);
          if (q < NPORTS) begin
            check(LINK_OK[q], "flit sent on a missing link", t);
            if (!productive(f, q)) begin
              nonprod++;
              check(full_before[q], "deflection from a group that was not full", t);
            end
          end else begin
            check(f.dst_x == X && f.dst_y == Y, "ejected flit not at destination", t);
            n_ej++;
          end
          held.delete(id);
        end
      end
    end
    check(nonprod == int'(defl_cnt), "deflection count", t);
    if (defl_cnt != 0) begin
      n_defl += defl_cnt;
    end
    n_rot += rot_cnt;
    check(int'(buf_cnt) == held.size(), $sformatf("buffer occupancy %0d vs %0d", buf_cnt, held.size()), t);
  endtask

  initial begin
    int next_id, load, best, nbest;
    checks = 0; failures = 0; done = 0;
    next_id = 1; draining = 0;
    in_flit = '0; inj_flit = '0;
    oldest_prev = -1; oldest_since = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 1; t <= CYCLES + 300; t++) begin
      @(negedge clk);
      if (t > 1) check_outputs(t);
      draining = (t > CYCLES);
      load = draining ? 0 : (t < 300) ? 20 : (t < 2000) ? 95 : 50;
      in_flit = '0;
      for (int p = 0; p < NPORTS; p++) begin
        if (LINK_OK[p] && $urandom_range(99) < load) begin
          in_flit[p].valid = 1'b1;
          in_flit[p].dst_x = 3'($urandom_range(7));
          in_flit[p].dst_y = 3'($urandom_range(7));
          in_flit[p].age   = 12'($urandom_range(300));
          in_flit[p].data  = 32'(next_id);
          held[next_id] = '{in_flit[p], t};
          next_id++;
        end
      end
      inj_flit = '0;
      if (load != 0 && $urandom_range(99) < 60) begin
        inj_flit.valid = 1'b1;
        inj_flit.dst_x = 3'($urandom_range(7));
        inj_flit.dst_y = 3'($urandom_range(7));
        inj_flit.data  = 32'(next_id);
      end
      #1;
      begin
        bit idle;
        idle = 0;
        for (int p = 0; p < NPORTS; p++) if (LINK_OK[p] && !in_flit[p].valid) idle = 1;
        check(inj_take == (inj_flit.valid && idle), "injection acceptance", t);
        if (inj_flit.valid && !idle) n_refused++;
      end
      // Groups holding NP flits with one arriving (and none leaving by
      // ejection) are the only ones allowed to deflect this clock.
      for (int g = 0; g < NPORTS; g++)
        full_before[g] = (dut.gocc[g] == NB / NPORTS) && dut.gin[g].valid && !dut.grant[g];
      if (inj_take) begin
        held[next_id] = '{inj_flit, t};
        next_id++;
        n_inj++;
      end
      // Oldest candidate of this clock.
      best = -1; nbest = 0; oldest_id = -1;
      foreach (held[k]) begin
        int a;
        a = int'(held[k].f.age) + (t - held[k].t_in);
        if (a > best) begin best = a; nbest = 1; oldest_id = k; end
        else if (a == best) nbest++;
      end
      oldest_unique = (nbest == 1);
      // At its destination, the unique oldest flit wins the ejection port.
      if (oldest_unique && held.exists(oldest_id)) begin
        flit_t of;
        of = held[oldest_id].f;
        if (of.dst_x == X && of.dst_y == Y) begin
          @(posedge clk); #1;
          check(ej_flit.valid && int'(ej_flit.data) == oldest_id, "oldest arrived flit not ejected", t);
        end
      end
      // Livelock freedom during the drain.
      if (draining && oldest_id >= 0) begin
        if (oldest_id != oldest_prev) begin oldest_prev = oldest_id; oldest_since = t; end
        check(t - oldest_since < 4, "oldest flit stuck for four clocks", t);
      end
    end
    @(negedge clk);
    check(held.size() == 0, "router did not drain", 0);
    check(n_defl > 0, "no deflection happened", 0);
    check(n_rot > 0, "no rotation happened", 0);
    check(n_ej > 0, "no ejection happened", 0);
    check(n_inj > 0 && n_refused > 0, "injection never taken or never refused", 0);
    $display("ring (%0d,%0d): deflections=%0d rotations=%0d ejected=%0d injected=%0d refused=%0d",
             X, Y, n_defl, n_rot, n_ej, n_inj, n_refused);
    done = 1;
  end
endmodule
