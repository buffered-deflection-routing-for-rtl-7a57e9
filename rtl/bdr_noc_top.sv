// bdr_noc_top -- the two buffered deflection routing networks side by side.
//
// Two independent 8x8 meshes with 16 flit buffers per router: one built from
// CENTRAL(16,B) routers (shared central buffers, best-B candidates cross the
// crossbar) and one from RING(16) routers (four buffers per port, rotating
// around the router). They share only the clock and reset; each has its own
// injection, ejection and statistics ports, named c_* and r_*. See bdr_mesh
// for the port protocol.
module bdr_noc_top
  import bdr_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned NB        = 16,
  parameter int unsigned B         = 8,
  parameter int unsigned INJ_DEPTH = 8,
  localparam int unsigned NN       = MESH_X * MESH_Y
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // CENTRAL mesh
  input  logic  [NN-1:0]                     c_inj_valid,
  output logic  [NN-1:0]                     c_inj_ready,
  input  flit_t [NN-1:0]                     c_inj_flit,
  output flit_t [NN-1:0]                     c_ej_flit,
  output logic  [NN-1:0][2:0]                c_defl_cnt,
  output logic  [NN-1:0][$clog2(NB+1)-1:0]   c_buf_cnt,
  // RING mesh
  input  logic  [NN-1:0]                     r_inj_valid,
  output logic  [NN-1:0]                     r_inj_ready,
  input  flit_t [NN-1:0]                     r_inj_flit,
  output flit_t [NN-1:0]                     r_ej_flit,
  output logic  [NN-1:0][2:0]                r_defl_cnt,
  output logic  [NN-1:0][$clog2(NB/2+1)-1:0] r_rot_cnt,
  output logic  [NN-1:0][$clog2(NB+1)-1:0]   r_buf_cnt
);
  bdr_mesh #(
    .ALGO(ALGO_CENTRAL), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NB(NB), .B(B),
    .INJ_DEPTH(INJ_DEPTH)
  ) u_central (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(c_inj_valid), .inj_ready(c_inj_ready), .inj_flit(c_inj_flit),
    .ej_flit(c_ej_flit), .defl_cnt(c_defl_cnt), .rot_cnt(), .buf_cnt(c_buf_cnt)
  );

  bdr_mesh #(
    .ALGO(ALGO_RING), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .NB(NB), .B(B),
    .INJ_DEPTH(INJ_DEPTH)
  ) u_ring (
    .clk(clk), .rst_n(rst_n),
    .inj_valid(r_inj_valid), .inj_ready(r_inj_ready), .inj_flit(r_inj_flit),
    .ej_flit(r_ej_flit), .defl_cnt(r_defl_cnt), .rot_cnt(r_rot_cnt), .buf_cnt(r_buf_cnt)
  );
endmodule
