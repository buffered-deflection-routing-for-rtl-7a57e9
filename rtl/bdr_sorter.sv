// bdr_sorter -- priority sorter: ranks N entries by a priority key.
//
// Valid entries come first, in decreasing key order; ties go to the lower
// input index, and invalid entries fill the tail. Each entry gets an extended
// key {valid, key, ~index}, which is unique, so a single comparison decides
// every pair. An entry's rank is the number of entries whose extended key is
// larger (an N x N comparator matrix, as a one-clock hardware priority sorter
// does it), and the output lists, for each rank, the index of the entry
// holding it. Purely combinational.
//
// The CENTRAL router uses it on flit ages over all its candidates; the RING
// router uses a 5-entry copy per port on the concatenation of the
// productive flag and the age, as its description suggests.
//
// Interface: key[i], valid[i] per entry; order[p] is the entry at rank p and
// order_valid[p] says whether that entry is valid.
module bdr_sorter #(
  parameter int unsigned N  = 20,
  parameter int unsigned KW = 12,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [KW-1:0] key   [N],
  input  logic [N-1:0]  valid,
  output logic [IW-1:0] order [N],
  output logic [N-1:0]  order_valid
);
  localparam int unsigned EW = 1 + KW + IW;

  logic [EW-1:0] ext  [N];
  logic [IW-1:0] rank [N];

  always_comb begin
    for (int i = 0; i < N; i++) ext[i] = {valid[i], key[i], ~IW'(i)};
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++)
        if (ext[j] > ext[i]) rank[i] = rank[i] + 1'b1;
    end
  end

  // The ranks are a permutation of 0..N-1, so every rank is written once.
  always_comb begin
    for (int p = 0; p < N; p++) order[p] = '0;
    order_valid = '0;
    for (int i = 0; i < N; i++) begin
      order[rank[i]]       = IW'(i);
      order_valid[rank[i]] = valid[i];
    end
  end
endmodule
