// tb_bdr_mesh -- end-to-end test of 4x4 meshes of both router kinds.
//
// A CENTRAL(16,8) mesh and a RING(16) mesh each get a corner-to-corner
// latency probe and then uniform random traffic at a load high enough to
// fill buffers, followed by a drain. tb_traffic checks that every flit
// arrives once, at the right node; this testbench also requires that
// deflections, full buffers, injection back-pressure and (RING) rotations
// each happened at least once.
module tb_bdr_mesh;
  import bdr_pkg::*;
  localparam int MX = 4, MY = 4, NN = MX * MY, NB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [1:0][NN-1:0]      inj_valid, inj_ready;
  flit_t [1:0][NN-1:0]      inj_flit, ej_flit;
  logic  [1:0][NN-1:0][2:0] defl_cnt;
  logic  [1:0][NN-1:0][3:0] rot_cnt;
  logic  [1:0][NN-1:0][4:0] buf_cnt;

  int  rate = 0, chk[2], fl[2], gen[2], del[2], stl[2];
  longint lat[2];
  bit  gen_en = 0, start = 0, pd[2];
  int  n_defl[2] = '{0, 0}, n_full[2] = '{0, 0}, n_rot = 0;

  bdr_mesh #(.ALGO(ALGO_CENTRAL), .MESH_X(MX), .MESH_Y(MY), .NB(NB), .B(8)) u_c (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[0]), .inj_ready(inj_ready[0]),
    .inj_flit(inj_flit[0]), .ej_flit(ej_flit[0]), .defl_cnt(defl_cnt[0]),
    .rot_cnt(rot_cnt[0]), .buf_cnt(buf_cnt[0]));
  bdr_mesh #(.ALGO(ALGO_RING), .MESH_X(MX), .MESH_Y(MY), .NB(NB), .B(8)) u_r (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[1]), .inj_ready(inj_ready[1]),
    .inj_flit(inj_flit[1]), .ej_flit(ej_flit[1]), .defl_cnt(defl_cnt[1]),
    .rot_cnt(rot_cnt[1]), .buf_cnt(buf_cnt[1]));

  tb_traffic #(.ALGO(ALGO_CENTRAL), .MX(MX), .MY(MY), .NAME("central")) t_c (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[0]), .inj_ready(inj_ready[0]),
    .inj_flit(inj_flit[0]), .ej_flit(ej_flit[0]), .pattern(0), .rate_pct(rate),
    .gen_en(gen_en), .start(start), .probe_done(pd[0]), .checks(chk[0]), .failures(fl[0]),
    .generated(gen[0]), .delivered(del[0]), .lat_sum(lat[0]), .stalls(stl[0]));
  tb_traffic #(.ALGO(ALGO_RING), .MX(MX), .MY(MY), .NAME("ring")) t_r (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[1]), .inj_ready(inj_ready[1]),
    .inj_flit(inj_flit[1]), .ej_flit(ej_flit[1]), .pattern(0), .rate_pct(rate),
    .gen_en(gen_en), .start(start), .probe_done(pd[1]), .checks(chk[1]), .failures(fl[1]),
    .generated(gen[1]), .delivered(del[1]), .lat_sum(lat[1]), .stalls(stl[1]));

  always @(negedge clk) begin
    for (int m = 0; m < 2; m++)
      for (int n = 0; n < NN; n++) begin
        n_defl[m] += int'(defl_cnt[m][n]);
        if (buf_cnt[m][n] == NB) n_full[m]++;
        if (m == 1) n_rot += int'(rot_cnt[m][n]);
      end
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1;
    wait (pd[0] && pd[1]);
    rate = 70;
    gen_en = 1;
    repeat (2000) @(negedge clk);
    gen_en = 0;
    repeat (1500) @(negedge clk);
    checks = chk[0] + chk[1];
    failures = fl[0] + fl[1];
    for (int m = 0; m < 2; m++) begin
      checks += 4;
      if (del[m] != gen[m]) begin failures++; $display("FAIL mesh %0d: %0d of %0d flits delivered", m, del[m], gen[m]); end
      if (n_defl[m] == 0) begin failures++; $display("FAIL mesh %0d: no deflection", m); end
      if (n_full[m] == 0) begin failures++; $display("FAIL mesh %0d: buffers never full", m); end
      if (stl[m] == 0) begin failures++; $display("FAIL mesh %0d: no injection back-pressure", m); end
      $display("%s: generated=%0d delivered=%0d avg_latency=%0d deflections=%0d full=%0d stalls=%0d",
               m ? "ring" : "central", gen[m], del[m], del[m] ? lat[m] / del[m] : 0, n_defl[m], n_full[m], stl[m]);
    end
    checks++;
    if (n_rot == 0) begin failures++; $display("FAIL ring: no rotation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
