// tb_bdr_noc_top -- end-to-end test of the full-size design: an 8x8
// CENTRAL(16,8) mesh and an 8x8 RING(16) mesh, all parameters at their
// defaults.
//
// Both meshes receive a corner-to-corner latency probe through the empty
// network, then the three synthetic traffic patterns of the evaluation in
// turn (uniform random, transpose, tornado), each at a heavy load, then a
// drain. tb_traffic checks that every flit is delivered exactly once to its
// destination with the right source. This testbench counts, per mesh, how
// often each mechanism happened and fails if one never did: flits held in
// buffers, buffers full, deflections, ejections, injection back-pressure and
// (RING only) rotations. It prints the accepted throughput (flits per node
// per clock) and the mean latency of each pattern.
module tb_bdr_noc_top;
  import bdr_pkg::*;
  localparam int MX = 8, MY = 8, NN = MX * MY, NB = 16;
  localparam int PHASE = 1500, DRAIN = 2500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  [1:0][NN-1:0]      inj_valid, inj_ready;
  flit_t [1:0][NN-1:0]      inj_flit, ej_flit;
  logic  [1:0][NN-1:0][2:0] defl_cnt;
  logic  [NN-1:0][3:0]      rot_cnt;
  logic  [1:0][NN-1:0][4:0] buf_cnt;

  bdr_noc_top dut (
    .clk(clk), .rst_n(rst_n),
    .c_inj_valid(inj_valid[0]), .c_inj_ready(inj_ready[0]), .c_inj_flit(inj_flit[0]),
    .c_ej_flit(ej_flit[0]), .c_defl_cnt(defl_cnt[0]), .c_buf_cnt(buf_cnt[0]),
    .r_inj_valid(inj_valid[1]), .r_inj_ready(inj_ready[1]), .r_inj_flit(inj_flit[1]),
    .r_ej_flit(ej_flit[1]), .r_defl_cnt(defl_cnt[1]), .r_rot_cnt(rot_cnt), .r_buf_cnt(buf_cnt[1])
  );

  int  pattern = 0, rate = 0, chk[2], fl[2], gen[2], del[2], stl[2];
  longint lat[2];
  bit  gen_en = 0, start = 0, pd[2];
  int  n_defl[2] = '{0, 0}, n_full[2] = '{0, 0}, n_buf[2] = '{0, 0}, n_ej[2] = '{0, 0}, n_rot = 0;

  tb_traffic #(.ALGO(ALGO_CENTRAL), .MX(MX), .MY(MY), .NAME("central")) t_c (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[0]), .inj_ready(inj_ready[0]),
    .inj_flit(inj_flit[0]), .ej_flit(ej_flit[0]), .pattern(pattern), .rate_pct(rate),
    .gen_en(gen_en), .start(start), .probe_done(pd[0]), .checks(chk[0]), .failures(fl[0]),
    .generated(gen[0]), .delivered(del[0]), .lat_sum(lat[0]), .stalls(stl[0]));
  tb_traffic #(.ALGO(ALGO_RING), .MX(MX), .MY(MY), .NAME("ring")) t_r (
    .clk(clk), .rst_n(rst_n), .inj_valid(inj_valid[1]), .inj_ready(inj_ready[1]),
    .inj_flit(inj_flit[1]), .ej_flit(ej_flit[1]), .pattern(pattern), .rate_pct(rate),
    .gen_en(gen_en), .start(start), .probe_done(pd[1]), .checks(chk[1]), .failures(fl[1]),
    .generated(gen[1]), .delivered(del[1]), .lat_sum(lat[1]), .stalls(stl[1]));

  always @(negedge clk) begin
    for (int m = 0; m < 2; m++)
      for (int n = 0; n < NN; n++) begin
        n_defl[m] += int'(defl_cnt[m][n]);
        if (buf_cnt[m][n] == NB) n_full[m]++;
        if (buf_cnt[m][n] != 0) n_buf[m]++;
        if (ej_flit[m][n].valid) n_ej[m]++;
      end
    for (int n = 0; n < NN; n++) n_rot += int'(rot_cnt[n]);
  end

  task automatic require(ref int checks, ref int failures, input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int checks, failures, d0[2], l0[2];
    longint ls0[2];
    string names[3] = '{"uniform", "transpose", "tornado"};
    int rates[3] = '{35, 25, 25};
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1;
    wait (pd[0] && pd[1]);
    for (int p = 0; p < 3; p++) begin
      for (int m = 0; m < 2; m++) begin d0[m] = del[m]; ls0[m] = lat[m]; end
      pattern = p;
      rate = rates[p];
      gen_en = 1;
      repeat (PHASE) @(negedge clk);
      for (int m = 0; m < 2; m++)
        $display("%-9s %-7s offered=%0d%% accepted=%0d.%03d flits/node/clock mean latency=%0d",
                 names[p], m ? "RING" : "CENTRAL", rates[p],
                 ((del[m] - d0[m]) * 1000 / (PHASE * NN)) / 1000, ((del[m] - d0[m]) * 1000 / (PHASE * NN)) % 1000,
                 (del[m] > d0[m]) ? int'((lat[m] - ls0[m]) / (del[m] - d0[m])) : 0);
    end
    gen_en = 0;
    repeat (DRAIN) @(negedge clk);
    checks = chk[0] + chk[1];
    failures = fl[0] + fl[1];
    for (int m = 0; m < 2; m++) begin
      require(checks, failures, del[m] == gen[m], $sformatf("mesh %0d: %0d of %0d flits delivered", m, del[m], gen[m]));
      require(checks, failures, n_buf[m] > 0, "no flit was ever buffered");
      require(checks, failures, n_full[m] > 0, "buffers never full");
      require(checks, failures, n_defl[m] > 0, "no deflection");
      require(checks, failures, n_ej[m] > 0, "no ejection");
      require(checks, failures, stl[m] > 0, "no injection back-pressure");
      $display("%s: generated=%0d delivered=%0d buffered=%0d full=%0d deflections=%0d ejections=%0d stalls=%0d",
               m ? "RING" : "CENTRAL", gen[m], del[m], n_buf[m], n_full[m], n_defl[m], n_ej[m], stl[m]);
    end
    require(checks, failures, n_rot > 0, "no ring rotation");
    $display("RING rotations=%0d", n_rot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * PHASE + DRAIN + 2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
