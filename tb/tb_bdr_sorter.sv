// tb_bdr_sorter -- randomized check of the priority sorter.
//
// Two sizes are tested: the 20-entry sorter of a CENTRAL(16,*) router and
// the 5-entry, 13-bit-key sorter of a RING port group. For random keys and
// valid bits (with many equal keys), the expected order is built in the
// testbench by selection sort: valid entries first, larger keys first,
// lower index first on a tie.
module tb_bdr_sorter;
  localparam int N1 = 20, K1 = 12, N2 = 5, K2 = 13;

  logic [K1-1:0]          key1 [N1];
  logic [N1-1:0]          v1, ov1;
  logic [$clog2(N1)-1:0]  o1 [N1];
  logic [K2-1:0]          key2 [N2];
  logic [N2-1:0]          v2, ov2;
  logic [$clog2(N2)-1:0]  o2 [N2];
  int checks = 0, failures = 0;

  bdr_sorter #(.N(N1), .KW(K1)) dut1 (.key(key1), .valid(v1), .order(o1), .order_valid(ov1));
  bdr_sorter #(.N(N2), .KW(K2)) dut2 (.key(key2), .valid(v2), .order(o2), .order_valid(ov2));

  // better(a, b): entry a ranks ahead of entry b.
  function automatic bit better(bit va, int ka, int ia, bit vb, int kb, int ib);
    if (va != vb) return va;
    if (ka != kb) return ka > kb;
    return ia < ib;
  endfunction

  task automatic ref_order(input int n, input int k[], input bit v[], output int o[]);
    bit taken[];
    taken = new[n];
    o = new[n];
    for (int p = 0; p < n; p++) begin
      int best;
      best = -1;
      for (int i = 0; i < n; i++)
        if (!taken[i] && (best < 0 || better(v[i], k[i], i, v[best], k[best], best))) best = i;
      taken[best] = 1;
      o[p] = best;
    end
  endtask

  initial begin
    int k[], o[];
    bit v[];
    for (int t = 0; t < 3000; t++) begin
      int range;
      range = (t % 3 == 0) ? 4 : (1 << K1);
      k = new[N1]; v = new[N1];
      for (int i = 0; i < N1; i++) begin
        k[i] = $urandom_range(range - 1);
        v[i] = ($urandom_range(3) != 0);
        key1[i] = K1'(k[i]); v1[i] = v[i];
      end
      #1;
      ref_order(N1, k, v, o);
      for (int p = 0; p < N1; p++) begin
        checks++;
        if (o1[p] != o[p] || ov1[p] != v[o[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL N=20 trial %0d rank %0d: got %0d exp %0d", t, p, o1[p], o[p]);
        end
      end
      k = new[N2]; v = new[N2];
      for (int i = 0; i < N2; i++) begin
        k[i] = $urandom_range((t % 2 == 0) ? 3 : (1 << K2) - 1);
        v[i] = ($urandom_range(4) != 0);
        key2[i] = K2'(k[i]); v2[i] = v[i];
      end
      #1;
      ref_order(N2, k, v, o);
      for (int p = 0; p < N2; p++) begin
        checks++;
        if (o2[p] != o[p] || ov2[p] != v[o[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL N=5 trial %0d rank %0d: got %0d exp %0d", t, p, o2[p], o[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
