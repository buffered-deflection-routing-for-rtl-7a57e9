// tb_central_harness -- drives one CENTRAL router with random traffic and
// checks it against a scoreboard of the flits it holds.
//
// Each clock, random flits (unique ids in the data field, random
// destinations and ages) arrive on the router's existing links, and a local
// flit is offered for injection. The scoreboard remembers every flit the
// router has accepted and the clock it entered. After each clock it checks:
//   * every flit leaving (link or ejection) was held, leaves once, and has
//     aged by exactly one per clock spent in the router;
//   * ejected flits are at their destination; link flits went through a
//     productive port unless they are counted as deflections;
//   * deflections happen only when the buffers end the clock full;
//   * the buffer count equals the number of flits held;
//   * the oldest candidate (when unique) leaves through a productive port;
//   * no flit outside the B oldest candidates crosses the crossbar;
//   * injection is taken exactly when some existing link is idle;
//   * the first flit through an empty router appears one clock later;
//   * everything drains once traffic stops.
// It fails if deflection, full buffers, ejection or a refused injection
// never happened.
module tb_central_harness
  import bdr_pkg::*;
#(
  parameter int unsigned NB = 16,
  parameter int unsigned B  = 8,
  parameter int unsigned X  = 3,
  parameter int unsigned Y  = 3,
  parameter int unsigned CYCLES = 3000
) (
  output int checks,
  output int failures,
  output bit done
);
  localparam int unsigned NC = NB + NPORTS;
  localparam int unsigned BE = (B == 0 || B > NC) ? NC : B;
  localparam bit [3:0] LINK_OK = {X > 0, Y < 7, X < 7, Y > 0};

  logic clk = 0, rst_n = 0;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  flit_t inj_flit, ej_flit;
  logic inj_take;
  logic [2:0] defl_cnt;
  logic [$clog2(NB+1)-1:0] buf_cnt;

  logic [COORD_W-1:0] cur_x = COORD_W'(X), cur_y = COORD_W'(Y);

  bdr_central_router #(.NB(NB), .B(B), .MESH_X(8), .MESH_Y(8)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { flit_t f; int t_in; } ent_t;
  ent_t held[int];

  int n_defl = 0, n_full = 0, n_ej = 0, n_inj = 0, n_refused = 0;
  int oldest_id, oldest_unique;
  int cand_age[int];

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
      if (failures < 12) $display("FAIL central B=%0d (%0d,%0d) cycle %0d: %s", B, X, Y, t, what);
    end
  endtask

  // Check what the router did in clock t-1, as seen after its edge.
  task automatic check_outputs(int t);
    int nonprod, id, rank;
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
            if (!productive(f, q)) nonprod++;
          end else begin
            check(f.dst_x == X && f.dst_y == Y, "ejected flit not at destination", t);
            n_ej++;
          end
          // Only the best B candidates may cross.
          rank = 0;
          foreach (cand_age[k]) if (cand_age[k] > cand_age[id]) rank++;
          check(rank < BE, "flit outside the best B crossed", t);
          if (id == oldest_id && oldest_unique) begin
            check(q == NPORTS || productive(f, q), "oldest flit deflected", t);
            oldest_id = -1;
          end
          held.delete(id);
        end
      end
    end
    check(nonprod == int'(defl_cnt), "deflection count", t);
    if (defl_cnt != 0) begin
      n_defl += defl_cnt;
      check(buf_cnt == NB, "deflection while buffers not full", t);
    end
    if (buf_cnt == NB) n_full++;
    check(int'(buf_cnt) == held.size(), "buffer occupancy", t);
    check(!(oldest_unique && oldest_id >= 0), "oldest flit did not leave", t);
  endtask

  initial begin
    int next_id, load, best, nbest;
    checks = 0; failures = 0; done = 0;
    next_id = 1;
    in_flit = '0; inj_flit = '0;
    oldest_id = -1; oldest_unique = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Latency: one flit through the empty router leaves one clock later.
    @(negedge clk);
    in_flit[LINK_OK[0] ? 0 : 1] = '{valid: 1'b1, dst_x: 3'(X == 7 ? 0 : 7), dst_y: 3'(Y), src_x: 0, src_y: 0,
                                    age: 12'd5, data: 32'hABCD};
    @(negedge clk);
    in_flit = '0;
    check(out_flit[PORT_E].valid || out_flit[PORT_W].valid, "one-clock router latency", 0);
    check((out_flit[PORT_E].valid ? out_flit[PORT_E].age : out_flit[PORT_W].age) == 12'd6, "age after one hop", 0);
    @(negedge clk);

    for (int t = 1; t <= CYCLES + 200; t++) begin
      @(negedge clk);
      if (t > 1) check_outputs(t);
      // New arrivals.
      load = (t > CYCLES) ? 0 : (t < 300) ? 20 : (t < 2000) ? 95 : 50;
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
      if (inj_take) begin
        held[next_id] = '{inj_flit, t};
        next_id++;
        n_inj++;
      end
      // Candidates of this clock and the oldest among them.
      cand_age.delete();
      best = -1; nbest = 0; oldest_id = -1;
      foreach (held[k]) begin
        cand_age[k] = int'(held[k].f.age) + (t - held[k].t_in);
        if (cand_age[k] > best) begin best = cand_age[k]; nbest = 1; oldest_id = k; end
        else if (cand_age[k] == best) nbest++;
      end
      oldest_unique = (nbest == 1);
    end
    @(negedge clk);
    check(held.size() == 0, "router did not drain", 0);
    check(n_defl > 0, "no deflection happened", 0);
    check(n_full > 0, "buffers never full", 0);
    check(n_ej > 0, "no ejection happened", 0);
    check(n_inj > 0 && n_refused > 0, "injection never taken or never refused", 0);
    $display("central B=%0d (%0d,%0d): deflections=%0d full_clocks=%0d ejected=%0d injected=%0d refused=%0d",
             B, X, Y, n_defl, n_full, n_ej, n_inj, n_refused);
    done = 1;
  end
endmodule
