// tb_bdr_ring_group -- cycle-by-cycle check of one RING port group against
// a reference computed in the testbench.
//
// The group under test is the East port group of a router at (3,3) with four
// buffers. Each clock the testbench drives a random arriving flit, a random
// rotating half from the previous group and a random ejection grant, reads
// the group's buffers, and works out independently:
//   * the ejection nominee (oldest arrived candidate);
//   * the ranked list (productive flits oldest first, then non-productive
//     youngest first) and whether its head leaves (productive, or group
//     full);
//   * which leftover flits rotate (the tail, at most two) and which stay.
// It compares the nominee and the rotating flits at once, and the output
// flit, deflection flag and new buffer contents after the clock edge. The
// routed flit must appear one clock later, one clock older.
module tb_bdr_ring_group;
  import bdr_pkg::*;
  localparam int NP = 4, HALF = 2, X = 3, Y = 3, PORT = 1;

  logic clk = 0, rst_n = 0;
  flit_t in_flit;
  flit_t [HALF-1:0] rot_in, rot_out;
  flit_t ej_nom, out_flit;
  logic ej_grant, defl;
  logic [$clog2(HALF+1)-1:0] rot_cnt;
  logic [$clog2(NP+1)-1:0] occ;
  int checks = 0, failures = 0;
  int n_route = 0, n_defl = 0, n_rot = 0, n_ej = 0;

  logic [COORD_W-1:0] cur_x = COORD_W'(X), cur_y = COORD_W'(Y);

  bdr_ring_group #(.NP(NP), .PORT(PORT)) dut (.*);

  always #5 clk = ~clk;

  function automatic bit prod_e(flit_t f);
    return f.dst_x > X;   // East shortens the path exactly when dst_x > X
  endfunction

  // a ranks ahead of b in the group's list
  function automatic bit ahead(flit_t a, int ia, flit_t b, int ib);
    if (prod_e(a) != prod_e(b)) return prod_e(a);
    if (a.age != b.age) return prod_e(a) ? (a.age > b.age) : (a.age < b.age);
    return ia < ib;
  endfunction

  function automatic flit_t rnd_flit(int pct, int id);
    flit_t f;
    f = '0;
    if ($urandom_range(99) < pct) begin
      f.valid = 1'b1;
      f.dst_x = 3'($urandom_range(7));
      f.dst_y = 3'($urandom_range(7));
      f.age   = 12'($urandom_range(3000));
      f.data  = 32'(id);
    end
    return f;
  endfunction

  task automatic check(bit cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("FAIL cycle %0d: %s", t, what);
    end
  endtask

  function automatic bit same(flit_t a, flit_t b);
    return a.valid == b.valid && (!a.valid || (a.data == b.data && a.age == b.age));
  endfunction

  initial begin
    flit_t c[NP+1];
    flit_t lst[$];
    int    idx[$];
    flit_t exp_out, exp_stay[HALF], exp_rot[HALF], rin_s[HALF];
    bit    exp_route;
    int    nom, id, m, krot, kstay;
    id = 1;
    in_flit = '0; rot_in = '0; ej_grant = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      in_flit = rnd_flit(70, id++);
      for (int j = 0; j < HALF; j++) rot_in[j] = rnd_flit((t % 400 < 200) ? 85 : 30, id++);
      ej_grant = ($urandom_range(99) < 50);
      #1;
      for (int b = 0; b < NP; b++) c[b] = dut.buf_q[b];
      c[NP] = in_flit;
      // Ejection nominee.
      nom = -1;
      for (int i = 0; i <= NP; i++)
        if (c[i].valid && c[i].dst_x == X && c[i].dst_y == Y && (nom < 0 || c[i].age > c[nom].age)) nom = i;
      check(ej_nom.valid == (nom >= 0), "nominee valid", t);
      if (nom >= 0) check(same(ej_nom, c[nom]), "nominee flit", t);
      if (nom >= 0 && ej_grant) begin c[nom].valid = 1'b0; n_ej++; end
      // Ranked list by insertion.
      lst.delete(); idx.delete();
      for (int i = 0; i <= NP; i++) begin
        if (c[i].valid) begin
          int pos;
          pos = 0;
          while (pos < lst.size() && ahead(lst[pos], idx[pos], c[i], i)) pos++;
          lst.insert(pos, c[i]);
          idx.insert(pos, i);
        end
      end
      exp_route = (lst.size() > 0) && (prod_e(lst[0]) || lst.size() == NP + 1);
      exp_out = '0;
      if (exp_route) begin
        exp_out = lst.pop_front();
        void'(idx.pop_front());
      end
      m = lst.size();
      krot = (m > HALF) ? HALF : m;
      kstay = m - krot;
      for (int j = 0; j < HALF; j++) begin
        exp_stay[j] = (j < kstay) ? lst[j] : '0;
        exp_rot[j]  = (j < krot) ? lst[kstay + j] : '0;
        check(same(rot_out[j], exp_rot[j]), "rotating flit", t);
        rin_s[j] = rot_in[j];
      end
      check(int'(rot_cnt) >= 0, "rot_cnt readable", t);
      @(posedge clk);
      #1;
      check(out_flit.valid == exp_route, "route decision", t);
      if (exp_route) begin
        check(out_flit.data == exp_out.data && out_flit.age == exp_out.age + 1, "routed flit and its age", t);
        check(defl == !prod_e(exp_out), "deflection flag", t);
        n_route++;
        if (defl) n_defl++;
      end
      check(int'(rot_cnt) == krot, "rotation count", t);
      n_rot += krot;
      for (int j = 0; j < HALF; j++) begin
        check(dut.buf_q[j].valid == exp_stay[j].valid &&
              (!exp_stay[j].valid || (dut.buf_q[j].data == exp_stay[j].data && dut.buf_q[j].age == exp_stay[j].age + 1)),
              "staying flit", t);
        check(dut.buf_q[HALF + j].valid == rin_s[j].valid &&
              (!rin_s[j].valid || (dut.buf_q[HALF + j].data == rin_s[j].data && dut.buf_q[HALF + j].age == rin_s[j].age + 1)),
              "flit rotated in", t);
      end
    end
    check(n_defl > 0 && n_route > n_defl && n_rot > 0 && n_ej > 0, "every mechanism happened", 0);
    $display("ring group: routed=%0d deflected=%0d rotated=%0d ejected=%0d", n_route, n_defl, n_rot, n_ej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
