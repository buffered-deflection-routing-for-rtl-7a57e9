// bdr_ring_router -- RING buffered deflection router for a 2D mesh.
//
// The router's NB buffers are split into one group of NP = NB/4 buffers per
// mesh port (bdr_ring_group). Every port arbitrates locally among its own
// buffered flits and its arriving flit and sends at most one flit out of its
// own link; half of each group's buffers then shift one group clockwise
// (N -> E -> S -> W -> N), carrying the flits that are not productive where
// they are towards a port that is. No crossbar is needed: each port has an
// NP+1 entry priority sorter and a small multiplexer. The oldest flit in the
// router either leaves through a productive port or rotates until it reaches
// one, so it always progresses and livelock cannot occur.
//
// Injection (this design's choice, following the rule the evaluation uses
// for deflection routers): the queued local flit takes the place of an idle
// incoming link, preferring a link whose port is productive for it, and only
// links that exist at this mesh position are used. Ejection (also this
// design's choice): each group nominates its oldest arrived flit and the
// oldest nominee leaves through the single ejection port each clock.
//
// Timing: single-cycle router; out_flit and ej_flit are registered. Every
// flit held by the router ages by one per clock.
//
// Interface: cur_x/cur_y are the router's mesh coordinates (constants from
// the mesh); in_flit[p]/out_flit[p] per mesh port (N,E,S,W); inj_flit is the
// head of the injection queue and inj_take pops it; ej_flit is the ejected
// flit; defl_cnt counts deflections and rot_cnt rotated flits in the clock
// that produced out_flit; buf_cnt is the buffer occupancy.
module bdr_ring_router
  import bdr_pkg::*;
#(
  parameter int unsigned NB     = 16,
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [COORD_W-1:0]      cur_x,
  input  logic [COORD_W-1:0]      cur_y,
  input  flit_t [NPORTS-1:0]      in_flit,
  output flit_t [NPORTS-1:0]      out_flit,
  input  flit_t                   inj_flit,
  output logic                    inj_take,
  output flit_t                   ej_flit,
  output logic [2:0]              defl_cnt,
  output logic [$clog2(NB/2+1)-1:0] rot_cnt,
  output logic [$clog2(NB+1)-1:0] buf_cnt
);
  localparam int unsigned NP   = NB / NPORTS;
  localparam int unsigned HALF = NP / 2;
  localparam int unsigned HW   = $clog2(HALF + 1);
  localparam int unsigned OW   = $clog2(NP + 1);
  logic [NPORTS-1:0] LINK_OK;
  assign LINK_OK = {cur_x != '0, cur_y != COORD_W'(MESH_Y - 1),
                    cur_x != COORD_W'(MESH_X - 1), cur_y != '0};

  // ---------------------------------------------------------- injection
  logic [NPORTS:0]    inj_prod;
  logic [NPORTS-1:0]  idle;
  logic               inj_found;
  logic [1:0]         inj_port;
  flit_t [NPORTS-1:0] gin;

  bdr_route u_inj_route (.cur_x(cur_x), .cur_y(cur_y), .f(inj_flit), .prod(inj_prod));

  always_comb begin
    inj_found = 1'b0;
    inj_port  = '0;
    for (int p = 0; p < NPORTS; p++) idle[p] = LINK_OK[p] && !in_flit[p].valid;
    // Lowest idle productive link first, else lowest idle link.
    for (int p = NPORTS - 1; p >= 0; p--)
      if (idle[p] && !inj_prod[p]) begin inj_found = 1'b1; inj_port = 2'(p); end
    for (int p = NPORTS - 1; p >= 0; p--)
      if (idle[p] && inj_prod[p]) begin inj_found = 1'b1; inj_port = 2'(p); end
    inj_take = inj_flit.valid && inj_found;
    for (int p = 0; p < NPORTS; p++) begin
      gin[p] = in_flit[p];
      if (!LINK_OK[p]) gin[p].valid = 1'b0;
    end
    if (inj_take) gin[inj_port] = inj_flit;
  end

  // ------------------------------------------------------------- groups
  flit_t [NPORTS-1:0][HALF-1:0] rot;
  flit_t [NPORTS-1:0]           nom;
  logic  [NPORTS-1:0]           grant;
  logic  [NPORTS-1:0]           gdefl;
  logic  [NPORTS-1:0][HW-1:0]   grot;
  logic  [NPORTS-1:0][OW-1:0]   gocc;

  for (genvar p = 0; p < NPORTS; p++) begin : g_grp
    bdr_ring_group #(.NP(NP), .PORT(p)) u_grp (
      .clk      (clk),
      .rst_n    (rst_n),
      .cur_x    (cur_x),
      .cur_y    (cur_y),
      .in_flit  (gin[p]),
      .rot_in   (rot[(p + NPORTS - 1) % NPORTS]),
      .rot_out  (rot[p]),
      .ej_nom   (nom[p]),
      .ej_grant (grant[p]),
      .out_flit (out_flit[p]),
      .defl     (gdefl[p]),
      .rot_cnt  (grot[p]),
      .occ      (gocc[p])
    );
  end

  // ------------------------------------------------------ ejection arbiter
  logic       ej_found;
  logic [1:0] ej_sel;

  always_comb begin
    ej_found = 1'b0;
    ej_sel   = '0;
    for (int p = 0; p < NPORTS; p++)
      if (nom[p].valid && (!ej_found || nom[p].age > nom[ej_sel].age)) begin
        ej_found = 1'b1;
        ej_sel   = 2'(p);
      end
    grant = '0;
    if (ej_found) grant[ej_sel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ej_flit <= '0;
    else        ej_flit <= ej_found ? nom[ej_sel] : '0;
  end

  // --------------------------------------------------------------- stats
  always_comb begin
    defl_cnt = '0;
    rot_cnt  = '0;
    buf_cnt  = '0;
    for (int p = 0; p < NPORTS; p++) begin
      defl_cnt = defl_cnt + 3'(gdefl[p]);
      rot_cnt  = rot_cnt + ($clog2(NB/2+1))'(grot[p]);
      buf_cnt  = buf_cnt + ($clog2(NB+1))'(gocc[p]);
    end
  end
endmodule
