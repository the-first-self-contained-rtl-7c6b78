// prefix_iteration: one layer of the Kogge-Stone style prefix-sum network.
//
// Every lane j adds the value OFFSET lanes to its left when such a lane
// exists:  b[j] = a[j] + a[j-OFFSET] for j >= OFFSET, otherwise b[j] = a[j].
// Chaining layers with offsets 1, 2, 4, ... turns a vector of bits into its
// inclusive prefix sum (see prefix_sum).
//
// Interface: a[N] and b[N] of W bits each. Purely combinational. The rule is
// the published one; the lane width W is a parameter so that the same layer
// serves every stage of the network.
module prefix_iteration #(
  parameter int unsigned N      = radix_sort_pkg::DEFAULT_N,
  parameter int unsigned W      = $clog2(radix_sort_pkg::DEFAULT_N + 1),
  parameter int unsigned OFFSET = 1
) (
  input  logic [W-1:0] a [N],
  output logic [W-1:0] b [N]
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      if (j >= OFFSET) b[j] = a[j] + a[j-OFFSET];
      else             b[j] = a[j];
    end
  end

endmodule
