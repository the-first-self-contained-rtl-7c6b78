// prefix_sum: inclusive prefix sum of the N predicate bits.
//
// prefix[i] = pred[0] + pred[1] + ... + pred[i]. The sum is formed by a
// Kogge-Stone network of L = ceil(log2 N) prefix_iteration layers; layer
// l (1..L) adds the lane 2^(l-1) positions to the left. Layer 0 is the
// predicate vector widened to W = ceil(log2(N+1)) bits, which is log2(N)+1
// bits for a power-of-two N and is just wide enough for prefix[N-1] = N.
//
// Interface: pred[N] in, prefix[N] of W bits out. Purely combinational;
// depth is L adders. The layer structure and offsets are the published
// ones; support for N that is not a power of two is this design's choice.
module prefix_sum #(
  parameter int unsigned N = radix_sort_pkg::DEFAULT_N,
  localparam int unsigned W = $clog2(N + 1),
  localparam int unsigned L = (N > 1) ? $clog2(N) : 0
) (
  input  logic [N-1:0] pred,
  output logic [W-1:0] prefix [N]
);

  // g_layer[l].s holds the partial sums after l prefix iterations.
  for (genvar l = 0; l <= L; l++) begin : g_layer
    logic [W-1:0] s [N];
    if (l == 0) begin : g_in
      always_comb begin
        for (int unsigned j = 0; j < N; j++) s[j] = W'(pred[j]);
      end
    end else begin : g_iter
      prefix_iteration #(
        .N      (N),
        .W      (W),
        .OFFSET (1 << (l - 1))
      ) u_iter (
        .a (g_layer[l-1].s),
        .b (s)
      );
    end
  end

  assign prefix = g_layer[L].s;

endmodule
