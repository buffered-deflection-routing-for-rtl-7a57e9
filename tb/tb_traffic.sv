// tb_traffic -- synthetic processors and delivery scoreboard for a mesh.
//
// Each node has a processor that, in every clock of a traffic phase,
// generates a new flit with probability rate_pct/100 towards a destination
// given by the traffic pattern:
//   0 uniform random  any node but itself
//   1 transpose       (x,y) -> (y,x); nodes on the diagonal stay silent
//   2 tornado         (x,y) -> ((x + ceil(MX/2) - 1) mod MX,
//                               (y + ceil(MY/2) - 1) mod MY)
// Generated flits wait in an unbounded per-node source queue (a model of
// the processor side) and are offered to the mesh's injection port.
// Every flit carries a unique id in its data field. The scoreboard checks
// that each flit is delivered exactly once, at its destination, with its
// source stamped correctly, and accumulates latency from generation to
// ejection (including the time spent queued at the source).
//
// A probe first sends one flit corner to corner through the empty network
// and checks its latency against the value worked out hop by hop:
// CENTRAL: one clock for the injection queue, one per router on the path,
// one for ejection. RING: like CENTRAL, plus one clock per clockwise
// rotation needed at each router to bring the flit from the group of the
// port it arrived on to a productive port.
module tb_traffic
  import bdr_pkg::*;
#(
  parameter algo_e ALGO   = ALGO_CENTRAL,
  parameter int    MX     = 8,
  parameter int    MY     = 8,
  parameter string NAME   = "mesh",
  localparam int   NN     = MX * MY
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic  [NN-1:0]      inj_valid,
  input  logic  [NN-1:0]      inj_ready,
  output flit_t [NN-1:0]      inj_flit,
  input  flit_t [NN-1:0]      ej_flit,
  input  int                  pattern,
  input  int                  rate_pct,
  input  bit                  gen_en,
  input  bit                  start,
  output bit                  probe_done,
  output int                  checks,
  output int                  failures,
  output int                  generated,
  output int                  delivered,
  output longint              lat_sum,
  output int                  stalls
);
  typedef struct { int dst; int src; int t_gen; } exp_t;
  exp_t  expect_q[int];
  flit_t srcq[NN][$];
  int    cyc = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL %s cycle %0d: %s", NAME, cyc, what);
    end
  endtask

  function automatic int dest_of(int n, int pat);
    int x, y, d;
    x = n % MX; y = n / MX;
    case (pat)
      1: d = (y < MX && x < MY) ? x * MX + y : n;
      2: d = ((y + (MY + 1) / 2 - 1) % MY) * MX + ((x + (MX + 1) / 2 - 1) % MX);
      default: begin
        d = $urandom_range(NN - 2);
        if (d >= n) d++;
      end
    endcase
    return d;
  endfunction

  // Probe latency through an empty network, worked out hop by hop.
  function automatic int probe_latency(int sx, int sy, int dx, int dy);
    int x, y, lat, inport, r, q;
    bit prod[4];
    x = sx; y = sy; lat = 1; inport = -1;
    while (x != dx || y != dy) begin
      prod = '{dy < y, dx > x, dy > y, dx < x};
      if (ALGO == ALGO_RING && inport >= 0) begin
        r = 0;
        while (!prod[(inport + r) % 4]) r++;
        q = (inport + r) % 4;
      end else begin
        r = 0;
        // Lowest-numbered productive port (N, E, S, W order).
        q = prod[0] ? 0 : prod[1] ? 1 : prod[2] ? 2 : 3;
      end
      lat += r + 1;
      case (q)
        0: begin y--; inport = 2; end
        1: begin x++; inport = 3; end
        2: begin y++; inport = 0; end
        default: begin x--; inport = 1; end
      endcase
    end
    return lat + 1;
  endfunction

  logic [NN-1:0] acc;

  initial begin
    int id, probe_t0, lat_exp;
    bit probe_seen;
    checks = 0; failures = 0; generated = 0; delivered = 0; lat_sum = 0; stalls = 0;
    probe_done = 0;
    inj_valid = '0; inj_flit = '0;
    id = 1;
    wait (start);
    // ------------------------------------------------------------ probe
    @(negedge clk);
    inj_valid[0] = 1'b1;
    inj_flit[0] = '0;
    inj_flit[0].dst_x = 3'(MX - 1);
    inj_flit[0].dst_y = 3'(MY - 1);
    inj_flit[0].data  = 32'hFFFF_0000;
    probe_t0 = 0;
    probe_seen = 0;
    lat_exp = probe_latency(0, 0, MX - 1, MY - 1);
    for (int k = 1; k < 200 && !probe_seen; k++) begin
      @(negedge clk);
      inj_valid = '0;
      for (int n = 0; n < NN; n++)
        if (ej_flit[n].valid) begin
          check(n == NN - 1 && ej_flit[n].data == 32'hFFFF_0000, "probe delivered to the wrong node");
          check(k == lat_exp, $sformatf("probe latency %0d, expected %0d", k, lat_exp));
          probe_seen = 1;
        end
    end
    check(probe_seen, "probe never delivered");
    probe_done = 1;
    // ----------------------------------------------------- random traffic
    forever begin
      @(negedge clk);
      cyc++;
      // Deliveries of the last clock.
      for (int n = 0; n < NN; n++) begin
        if (ej_flit[n].valid) begin
          int fid;
          fid = int'(ej_flit[n].data);
          check(expect_q.exists(fid), "unknown or duplicated flit delivered");
          if (expect_q.exists(fid)) begin
            check(expect_q[fid].dst == n, "flit delivered to the wrong node");
            check(int'(ej_flit[n].src_y) * MX + int'(ej_flit[n].src_x) == expect_q[fid].src, "source stamp");
            lat_sum += cyc - expect_q[fid].t_gen;
            delivered++;
            expect_q.delete(fid);
          end
        end
      end
      // Generation.
      for (int n = 0; n < NN; n++) begin
        if (gen_en && $urandom_range(99) < rate_pct) begin
          int d;
          flit_t f;
          d = dest_of(n, pattern);
          if (d != n) begin
            f = '0;
            f.valid = 1'b1;
            f.dst_x = 3'(d % MX);
            f.dst_y = 3'(d / MX);
            f.data  = 32'(id);
            expect_q[id] = '{d, n, cyc};
            id++;
            generated++;
            srcq[n].push_back(f);
          end
        end
        inj_valid[n] = (srcq[n].size() != 0);
        inj_flit[n]  = (srcq[n].size() != 0) ? srcq[n][0] : '0;
      end
      #1;
      acc = inj_valid & inj_ready;
      for (int n = 0; n < NN; n++) begin
        if (inj_valid[n] && !inj_ready[n]) stalls++;
        if (acc[n]) void'(srcq[n].pop_front());
      end
    end
  end

  function automatic int outstanding();
    return expect_q.size();
  endfunction
endmodule
