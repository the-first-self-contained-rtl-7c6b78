// compaction: third stage of one radix-sort iteration.
//
// Each element i gets a destination address from its predicate and its
// inclusive prefix sum:
//   pred[i] = 1 : addr[i] = prefix[i] - 1
//   pred[i] = 0 : addr[i] = i - prefix[i] + (pred[N-1] + prefix[N-2])
// pred[N-1] + prefix[N-2] is the number of elements whose predicate is 1, so
// predicate-1 elements fill addresses 0.. from the left and the rest fill the
// remaining addresses to the right, each group keeping its input order. This
// stability is what makes the least-significant-bit-first radix sort correct.
// The addresses form a permutation; a one-hot decoder per element steers it to
// its address and every output slot ORs the N decoded candidates, of which
// exactly one is active.
//
// Interface: elements[N][K], pred[N] and prefix[N] (W bits) in; the new
// addresses addr[N] (log2 N bits) and the reordered elements out. Purely
// combinational. The address formulas follow the published algorithm; the
// decoder-and-OR scatter is this design's way of building the move.
// Requires N >= 2.
module compaction #(
  parameter int unsigned N = radix_sort_pkg::DEFAULT_N,
  parameter int unsigned K = radix_sort_pkg::DEFAULT_K,
  localparam int unsigned W  = $clog2(N + 1),
  localparam int unsigned AW = $clog2(N)
) (
  input  logic [K-1:0]  elements  [N],
  input  logic [N-1:0]  pred,
  input  logic [W-1:0]  prefix    [N],
  output logic [AW-1:0] addr      [N],
  output logic [K-1:0]  reordered [N]
);

  // Arithmetic width: holds i + N without overflow before truncation.
  localparam int unsigned CW = $clog2(2 * N + 1);

  logic [CW-1:0] ones_total;

  always_comb begin
    ones_total = CW'(pred[N-1]) + CW'(prefix[N-2]);
    for (int unsigned i = 0; i < N; i++) begin
      if (pred[i]) addr[i] = AW'(CW'(prefix[i]) - CW'(1));
      else         addr[i] = AW'(CW'(i) - CW'(prefix[i]) + ones_total);
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < N; p++) begin
      reordered[p] = '0;
      for (int unsigned i = 0; i < N; i++) begin
        if (32'(addr[i]) == p) reordered[p] |= elements[i];
      end
    end
  end

endmodule
