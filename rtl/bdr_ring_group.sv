// bdr_ring_group -- one port's buffer group and local arbiter in the RING
// buffered deflection router.
//
// The group owns NP flit buffers. Each clock its candidates are its buffered
// flits plus the flit arriving on its port's incoming link (or the injected
// flit that took that idle link's place). They are ranked on the
// concatenation {productive, age'}, where productive means that this port
// shortens the flit's path, age' is the age for productive flits and the
// inverted age for non-productive ones. The list therefore runs: productive
// flits oldest first, then non-productive flits youngest first.
//   * The head of the list leaves through this port when it is productive,
//     or, when every candidate is non-productive and the group holds NP+1
//     flits (buffers full plus an arrival), as a deflection. In both cases
//     that is the highest-priority productive flit or the lowest-priority
//     non-productive flit.
//   * Of the flits left, the tail half (at most NP/2: the oldest
//     non-productive and the youngest productive flits) is handed to the next
//     group clockwise, so a stuck old flit travels round the ring until it
//     reaches a productive port. The head half stays in this group's lower
//     NP/2 buffers; the upper NP/2 buffers are refilled from the previous
//     group.
// Ejection is not given by the routing scheme for RING. Here each group
// nominates its oldest flit that has arrived, a router-level arbiter grants
// one group per clock, and the granted flit is removed before ranking.
// When fewer than NP flits remain, the tail still rotates first, so even a
// lone non-productive flit moves on. These are this design's choices.
//
// Interface: cur_x/cur_y are the router's coordinates; in_flit is the candidate on the link; rot_in/rot_out are the
// rotating halves from the previous and to the next group (combinational,
// not yet aged); ej_nom is this group's ejection nominee and ej_grant the
// arbiter's answer; out_flit is registered and one clock older; defl/rot_cnt
// report the clock that produced out_flit; occ is the occupancy.
module bdr_ring_group
  import bdr_pkg::*;
#(
  parameter int unsigned NP     = 4,
  parameter int unsigned PORT   = 0,
  localparam int unsigned HALF  = NP / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [COORD_W-1:0]      cur_x,
  input  logic [COORD_W-1:0]      cur_y,
  input  flit_t                   in_flit,
  input  flit_t [HALF-1:0]        rot_in,
  output flit_t [HALF-1:0]        rot_out,
  output flit_t                   ej_nom,
  input  logic                    ej_grant,
  output flit_t                   out_flit,
  output logic                    defl,
  output logic [$clog2(HALF+1)-1:0] rot_cnt,
  output logic [$clog2(NP+1)-1:0] occ
);
  localparam int unsigned NC = NP + 1;
  localparam int unsigned IW = $clog2(NC);
  localparam int unsigned CW = $clog2(NC + 1);
  localparam int unsigned HI = (HALF > 1) ? $clog2(HALF) : 1;

  flit_t buf_q [NP];

  // Candidates 0..NP-1 are the buffers, candidate NP the arriving flit.
  flit_t                   cand0 [NC];
  flit_t                   cand  [NC];
  logic  [NPORTS:0]        prod  [NC];
  logic  [NC-1:0]          here;
  logic  [AGE_W:0]         key [NC];
  logic  [NC-1:0]          cvalid;
  logic  [IW-1:0]          nom_idx;
  logic                    nom_found;

  always_comb begin
    for (int b = 0; b < NP; b++) cand0[b] = buf_q[b];
    cand0[NP] = in_flit;
  end

  for (genvar c = 0; c < NC; c++) begin : g_route
    bdr_route u_route (.cur_x(cur_x), .cur_y(cur_y), .f(cand0[c]), .prod(prod[c]));
  end

  // Ejection nominee: oldest candidate that has arrived.
  always_comb begin
    nom_found = 1'b0;
    nom_idx   = '0;
    ej_nom    = '0;
    for (int c = 0; c < NC; c++) begin
      if (prod[c][EJECT_BIT] && (!nom_found || cand0[c].age > ej_nom.age)) begin
        nom_found = 1'b1;
        nom_idx   = IW'(c);
        ej_nom    = cand0[c];
      end
    end
  end

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      cand[c] = cand0[c];
      if (ej_grant && nom_found && nom_idx == IW'(c)) cand[c].valid = 1'b0;
      here[c]   = prod[c][PORT];
      cvalid[c] = cand[c].valid;
      key[c]    = here[c] ? {1'b1, cand[c].age} : {1'b0, ~cand[c].age};
    end
  end

  logic [IW-1:0]         order [NC];
  logic [NC-1:0]         order_valid;

  bdr_sorter #(.N(NC), .KW(AGE_W + 1)) u_sort (
    .key(key), .valid(cvalid), .order(order), .order_valid(order_valid)
  );

  // Candidates in rank order.
  flit_t         srt [NC];
  logic          srt_here;   // head of the list is productive here

  always_comb begin
    for (int r = 0; r < NC; r++) begin
      srt[r] = cand[order[r]];
    end
    srt_here = here[order[0]];
  end

  logic [CW-1:0] n_valid, m, k_rot, k_stay, start;
  logic          route;
  flit_t         stay [HALF];
  logic  [$clog2(HALF+1)-1:0] rot_cnt_d;

  always_comb begin
    n_valid = '0;
    for (int r = 0; r < NC; r++) n_valid = n_valid + CW'(order_valid[r]);
    route  = order_valid[0] && (srt_here || n_valid == CW'(NC));
    start  = route ? CW'(1) : CW'(0);
    m      = n_valid - start;
    k_rot  = (m > CW'(HALF)) ? CW'(HALF) : m;
    k_stay = m - k_rot;
    for (int s = 0; s < HALF; s++) begin
      stay[s]    = '0;
      rot_out[s] = '0;
    end
    // Ranks start .. start+k_stay-1 stay, the next k_rot ranks rotate.
    for (int r = 0; r < NC; r++) begin
      if (CW'(r) >= start && CW'(r) < start + k_stay)
        stay[HI'(CW'(r) - start)] = srt[r];
      if (CW'(r) >= start + k_stay && CW'(r) < start + k_stay + k_rot)
        rot_out[HI'(CW'(r) - start - k_stay)] = srt[r];
    end
    rot_cnt_d = k_rot[$clog2(HALF+1)-1:0];
  end

  always_comb begin
    occ = '0;
    for (int b = 0; b < NP; b++) occ = occ + ($clog2(NP+1))'(buf_q[b].valid);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NP; b++) buf_q[b] <= '0;
      out_flit <= '0;
      defl     <= 1'b0;
      rot_cnt  <= '0;
    end else begin
      for (int s = 0; s < HALF; s++) begin
        buf_q[s]        <= age_step(stay[s]);
        buf_q[HALF + s] <= age_step(rot_in[s]);
      end
      out_flit <= route ? age_step(srt[0]) : '0;
      defl     <= route && !srt_here;
      rot_cnt  <= rot_cnt_d;
    end
  end
endmodule
