// bdr_central_router -- CENTRAL(NB,B) buffered deflection router for a 2D mesh.
//
// The router keeps NB flit buffers shared by the whole router (not tied to
// any input, output or virtual channel). Each clock the candidates are the
// flits on the four incoming links plus the NB buffered flits. They are
// ranked by age (oldest first) and only the best B of them may cross the
// crossbar. Walking the best B in rank order, each flit takes a free
// productive port (or the ejection port if it has arrived). A flit that finds
// no free productive port is buffered rather than deflected. Only when the
// flits left over would overflow the buffers are the highest-ranked leftover
// flits (still within the best B) sent out of any free port, i.e. deflected,
// as in a bufferless deflection router. Everything not sent goes to the
// buffers. The oldest flit always gets first choice, which rules out livelock;
// a flit is never refused by the next router, which rules out deadlock.
//
// Injection: the local flit waiting in the injection queue enters as a
// candidate in place of an idle incoming link, so it is accepted only when at
// least one existing incoming link is idle this clock. Ejection: one flit per
// clock.
//
// Capacity argument: at most P flits arrive (P = links of this router,
// injection included) and at most NB are buffered, so at most P flits must
// leave per clock; P <= 4 <= B, so the best B always hold enough flits to
// deflect.
//
// Timing: single-cycle router. Candidates are read at a clock edge and the
// chosen flits appear registered on out_flit/ej_flit after that edge, one
// clock older. Buffered flits also age by one each clock.
//
// Following the routing scheme: ranking, the best-B cut, productive-only
// routing while buffers suffice, deflection on overflow, shared buffers,
// single ejection. This design's choices: B=0 means "all candidates", ties
// in age go to the lower candidate index (links N,E,S,W, then buffers in
// their stored order), a flit takes the lowest-numbered free productive port,
// and deflected flits take the lowest-numbered free port. Buffers are stored
// compacted in rank order.
//
// Interface: cur_x/cur_y are the router's mesh coordinates (tied to
// constants by the mesh, so one router design serves every position);
// in_flit[p]/out_flit[p] per mesh port (p = N,E,S,W); inj_flit is
// the head of the injection queue and inj_take pops it; ej_flit is the flit
// ejected (registered); defl_cnt counts flits deflected in the clock that
// produced the current out_flit; buf_cnt is the buffer occupancy.
module bdr_central_router
  import bdr_pkg::*;
#(
  parameter int unsigned NB     = 16,
  parameter int unsigned B      = 8,
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COORD_W-1:0]        cur_x,
  input  logic [COORD_W-1:0]        cur_y,
  input  flit_t [NPORTS-1:0]        in_flit,
  output flit_t [NPORTS-1:0]        out_flit,
  input  flit_t                     inj_flit,
  output logic                      inj_take,
  output flit_t                     ej_flit,
  output logic [2:0]                defl_cnt,
  output logic [$clog2(NB+1)-1:0]   buf_cnt
);
  localparam int unsigned NC = NB + NPORTS;                // candidates
  localparam int unsigned BE = (B == 0 || B > NC) ? NC : B; // crossbar inputs
  localparam int unsigned IW = $clog2(NC);
  localparam int unsigned CW = $clog2(NC + 1);
  localparam int unsigned BW = $clog2(NB + 1);
  localparam int unsigned SW = (NB > 1) ? $clog2(NB) : 1;

  // Which mesh links exist at this position.
  logic [NPORTS-1:0] LINK_OK;
  assign LINK_OK = {cur_x != '0, cur_y != COORD_W'(MESH_Y - 1),
                    cur_x != COORD_W'(MESH_X - 1), cur_y != '0};

  flit_t buf_q [NB];

  // ---------------------------------------------------------------- candidates
  // Candidates 0..3 are the links N,E,S,W (the injected flit replaces an idle
  // one), candidates 4.. are the buffers.
  flit_t                     cand [NC];
  logic  [NPORTS:0]          prod [NC];
  logic  [AGE_W-1:0]         key [NC];
  logic  [NC-1:0]            cvalid;
  logic                      inj_slot_found;
  logic  [1:0]               inj_slot;

  always_comb begin
    inj_slot_found = 1'b0;
    inj_slot       = '0;
    for (int p = NPORTS - 1; p >= 0; p--) begin
      if (LINK_OK[p] && !in_flit[p].valid) begin
        inj_slot_found = 1'b1;
        inj_slot       = 2'(p);
      end
    end
    inj_take = inj_flit.valid && inj_slot_found;

    for (int p = 0; p < NPORTS; p++) begin
      cand[p] = in_flit[p];
      if (!LINK_OK[p]) cand[p].valid = 1'b0;
      if (inj_take && inj_slot == 2'(p)) cand[p] = inj_flit;
    end
    for (int b = 0; b < NB; b++) cand[NPORTS + b] = buf_q[b];
    for (int c = 0; c < NC; c++) begin
      key[c]    = cand[c].age;
      cvalid[c] = cand[c].valid;
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_route
    bdr_route u_route (.cur_x(cur_x), .cur_y(cur_y), .f(cand[c]), .prod(prod[c]));
  end

  // ------------------------------------------------------------------ ranking
  logic [IW-1:0]         order [NC];
  logic [NC-1:0]         order_valid;

  bdr_sorter #(.N(NC), .KW(AGE_W)) u_sort (
    .key(key), .valid(cvalid), .order(order), .order_valid(order_valid)
  );

  // Candidates in rank order (the crossbar's input side).
  flit_t           srt      [NC];
  logic [NPORTS:0] srt_prod [NC];

  always_comb begin
    for (int r = 0; r < NC; r++) begin
      srt[r]      = cand[order[r]];
      srt_prod[r] = prod[order[r]];
    end
  end

  // ------------------------------------------------------------- allocation
  // assign_oh[r] is the one-hot output (bit EJECT_BIT = ejection) given to the
  // flit at rank r, zero when it stays in the buffers.
  logic [NPORTS:0] assign_oh [NC];
  logic [NC-1:0]   deflected;
  logic [NPORTS:0] used;
  logic [CW-1:0]   n_valid, n_assigned, need;
  logic [NPORTS:0] avail;
  logic            got;

  always_comb begin
    for (int r = 0; r < NC; r++) assign_oh[r] = '0;
    deflected  = '0;
    used       = '0;
    n_valid    = '0;
    n_assigned = '0;
    for (int r = 0; r < NC; r++) n_valid = n_valid + CW'(order_valid[r]);

    // Pass 1: productive ports only, best BE flits in rank order.
    for (int r = 0; r < BE; r++) begin
      avail = srt_prod[r] & ~used & {1'b1, LINK_OK};
      got   = 1'b0;
      if (order_valid[r]) begin
        for (int q = 0; q <= NPORTS; q++) begin
          if (!got && avail[q]) begin
            got          = 1'b1;
            assign_oh[r] = (NPORTS+1)'(1) << q;
            used[q]      = 1'b1;
          end
        end
      end
      if (got) n_assigned = n_assigned + 1'b1;
    end

    // Pass 2: if the leftover flits exceed the buffers, deflect the
    // highest-ranked leftover flits through any free link.
    need = (n_valid - n_assigned > CW'(NB)) ? (n_valid - n_assigned - CW'(NB)) : '0;
    for (int r = 0; r < BE; r++) begin
      avail = {1'b0, ~used[NPORTS-1:0] & LINK_OK};
      got   = 1'b0;
      if (order_valid[r] && assign_oh[r] == '0 && need != '0) begin
        for (int q = 0; q < NPORTS; q++) begin
          if (!got && avail[q]) begin
            got          = 1'b1;
            assign_oh[r] = (NPORTS+1)'(1) << q;
            used[q]      = 1'b1;
          end
        end
      end
      if (got) begin
        deflected[r] = 1'b1;
        need         = need - 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- next state
  flit_t              out_d [NPORTS];
  flit_t              ej_d;
  flit_t              buf_d [NB];
  logic  [2:0]        defl_d;
  logic  [CW-1:0]     slot;
  logic  [BW-1:0]     cnt_d;
  logic  [NC-1:0]     stays;

  always_comb begin
    for (int q = 0; q < NPORTS; q++) out_d[q] = '0;
    for (int b = 0; b < NB; b++) buf_d[b] = '0;
    ej_d   = '0;
    defl_d = '0;
    slot   = '0;
    for (int r = 0; r < NC; r++) begin
      stays[r] = order_valid[r] && assign_oh[r] == '0;
      // Leftover flit: into the next free buffer (never overflows, see the
      // capacity argument above). Valid flits come first in rank order, so
      // the leftover flits are written in rank order.
      if (stays[r] && slot < CW'(NB)) buf_d[slot[SW-1:0]] = age_step(srt[r]);
      if (stays[r]) slot = slot + 1'b1;
      for (int q = 0; q < NPORTS; q++)
        if (assign_oh[r][q]) out_d[q] = age_step(srt[r]);
      if (assign_oh[r][EJECT_BIT]) ej_d = srt[r];
      if (deflected[r]) defl_d = defl_d + 1'b1;
    end
    cnt_d = slot[BW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NB; b++) buf_q[b] <= '0;
      out_flit <= '0;
      ej_flit  <= '0;
      defl_cnt <= '0;
      buf_cnt  <= '0;
    end else begin
      for (int b = 0; b < NB; b++) buf_q[b] <= buf_d[b];
      for (int q = 0; q < NPORTS; q++) out_flit[q] <= out_d[q];
      ej_flit  <= ej_d;
      defl_cnt <= defl_d;
      buf_cnt  <= cnt_d;
    end
  end

  // The buffers never overflow.
  always_ff @(posedge clk) begin
    if (rst_n) a_no_overflow: assert (slot <= CW'(NB));
  end
endmodule
