// predication: first stage of one radix-sort iteration.
//
// For every element j in parallel a multiplexer picks bit `bit_index` of the
// element, and the predicate is that bit compared for equality with the
// descending flag:  pred[j] = (elements[j][bit_index] == is_descending).
// An element whose predicate is 1 is moved to the left (lower addresses) by
// the compaction stage, so with is_descending = 0 the elements holding a 0 in
// the current bit come first (ascending order), and with is_descending = 1
// those holding a 1 come first (descending order).
//
// Interface: elements[N][K] in, bit_index selects the bit (0 = LSB), pred[N]
// out. Purely combinational, no clock. The structure (one mux per element,
// equality with the order flag) is the published one; a bit_index of K or
// more is outside the element and yields bit value 0 (this design's choice).
module predication #(
  parameter int unsigned N = radix_sort_pkg::DEFAULT_N,
  parameter int unsigned K = radix_sort_pkg::DEFAULT_K,
  localparam int unsigned IW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [K-1:0]  elements [N],
  input  logic [IW-1:0] bit_index,
  input  logic          is_descending,
  output logic [N-1:0]  pred
);

  always_comb begin
    for (int unsigned j = 0; j < N; j++) begin
      logic sel_bit;
      sel_bit = (32'(bit_index) < K) ? elements[j][bit_index] : 1'b0;
      pred[j] = (sel_bit == is_descending);
    end
  end

endmodule
