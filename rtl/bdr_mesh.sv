// bdr_mesh -- MESH_X x MESH_Y 2D mesh of buffered deflection routers.
//
// Every node has a router (CENTRAL(NB,B) or RING(NB), chosen by ALGO), an
// injection queue in front of it and one ejection port. Links are a single
// registered hop: the output register of one router is the input of its
// neighbour, so a flit moves one hop per clock. Links that would leave the
// mesh are absent; the routers know their position and never use them.
//
// Injection: a processor offers a flit with inj_valid/inj_flit (dst_x, dst_y
// and data are used; the mesh stamps the source coordinates and a zero age)
// and it is queued when inj_ready is high. The router takes the head of the
// queue in a clock where one of its incoming links is idle. Ejection:
// ej_flit[n] is valid for one clock for each delivered flit.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X; x grows East and y South.
// Per-node statistics: defl_cnt (deflections), rot_cnt (RING rotations, zero
// for CENTRAL) and buf_cnt (buffer occupancy).
module bdr_mesh
  import bdr_pkg::*;
#(
  parameter algo_e       ALGO      = ALGO_CENTRAL,
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned NB        = 16,
  parameter int unsigned B         = 8,
  parameter int unsigned INJ_DEPTH = 8,
  localparam int unsigned NN       = MESH_X * MESH_Y
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic  [NN-1:0]                inj_valid,
  output logic  [NN-1:0]                inj_ready,
  input  flit_t [NN-1:0]                inj_flit,
  output flit_t [NN-1:0]                ej_flit,
  output logic  [NN-1:0][2:0]           defl_cnt,
  output logic  [NN-1:0][$clog2(NB/2+1)-1:0] rot_cnt,
  output logic  [NN-1:0][$clog2(NB+1)-1:0]   buf_cnt
);
  flit_t [NN-1:0][NPORTS-1:0] rout;   // router outputs (link registers)
  flit_t [NN-1:0][NPORTS-1:0] rin;    // router inputs

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // Link wiring: what arrives on port p was sent by the neighbour in
      // direction p through its opposite port.
      if (y > 0) begin : g_ln
        assign rin[N][PORT_N] = rout[N - MESH_X][PORT_S];
      end else begin : g_nn
        assign rin[N][PORT_N] = '0;
      end
      if (x < MESH_X - 1) begin : g_le
        assign rin[N][PORT_E] = rout[N + 1][PORT_W];
      end else begin : g_ne
        assign rin[N][PORT_E] = '0;
      end
      if (y < MESH_Y - 1) begin : g_ls
        assign rin[N][PORT_S] = rout[N + MESH_X][PORT_N];
      end else begin : g_ns
        assign rin[N][PORT_S] = '0;
      end
      if (x > 0) begin : g_lw
        assign rin[N][PORT_W] = rout[N - 1][PORT_E];
      end else begin : g_nw
        assign rin[N][PORT_W] = '0;
      end

      flit_t push_f, head;
      logic  take;

      always_comb begin
        push_f       = inj_flit[N];
        push_f.valid = 1'b1;
        push_f.src_x = COORD_W'(x);
        push_f.src_y = COORD_W'(y);
        push_f.age   = '0;
      end

      bdr_inj_fifo #(.DEPTH(INJ_DEPTH)) u_q (
        .clk        (clk),
        .rst_n      (rst_n),
        .push_valid (inj_valid[N]),
        .push_ready (inj_ready[N]),
        .push_flit  (push_f),
        .pop_flit   (head),
        .pop_ready  (take),
        .level      ()
      );

      if (ALGO == ALGO_CENTRAL) begin : g_central
        bdr_central_router #(
          .NB(NB), .B(B), .MESH_X(MESH_X), .MESH_Y(MESH_Y)
        ) u_rt (
          .clk      (clk),
          .rst_n    (rst_n),
          .cur_x    (COORD_W'(x)),
          .cur_y    (COORD_W'(y)),
          .in_flit  (rin[N]),
          .out_flit (rout[N]),
          .inj_flit (head),
          .inj_take (take),
          .ej_flit  (ej_flit[N]),
          .defl_cnt (defl_cnt[N]),
          .buf_cnt  (buf_cnt[N])
        );
        assign rot_cnt[N] = '0;
      end else begin : g_ring
        bdr_ring_router #(
          .NB(NB), .MESH_X(MESH_X), .MESH_Y(MESH_Y)
        ) u_rt (
          .clk      (clk),
          .rst_n    (rst_n),
          .cur_x    (COORD_W'(x)),
          .cur_y    (COORD_W'(y)),
          .in_flit  (rin[N]),
          .out_flit (rout[N]),
          .inj_flit (head),
          .inj_take (take),
          .ej_flit  (ej_flit[N]),
          .defl_cnt (defl_cnt[N]),
          .rot_cnt  (rot_cnt[N]),
          .buf_cnt  (buf_cnt[N])
        );
      end
    end
  end
endmodule
