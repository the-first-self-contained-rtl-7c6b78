// radix_sorter: self-contained parallel radix sorter (top level).
//
// Sorts N unsigned K-bit numbers, held entirely on chip, by a least-
// significant-bit-first radix sort that spends one clock per bit. Each clock
// the three stages run combinationally on the whole array:
//   predication  - pick the current bit of every element, compare it with
//                  the order flag;
//   prefix_sum   - inclusive prefix sum of the predicates (Kogge-Stone);
//   compaction   - move predicate-1 elements to the left and the others to
//                  the right, stably;
// and the reordered numbers are written back into element_array. A register
// holds the current bit index, and a small state machine repeats the
// iteration for the requested number of bits.
//
// Interface (all synchronous to clk, active-low asynchronous rst_n):
//   start         one-cycle request, accepted when not busy; it loads data_in
//                 into the array and latches is_descending and num_bits.
//   is_descending 0: ascending, 1: descending order.
//   num_bits      bits to sort on, from the LSB (0..K; larger values are
//                 treated as K). Bits above num_bits are ignored by the key.
//   data_in       the N numbers to sort, element 0 first.
//   data_out      the array contents; the sorted numbers once sorted = 1,
//                 element 0 being the smallest (ascending) or largest.
//   busy          high while iterating.
//   sorted        high from the end of the sort until the next start.
//   bit_index     the bit the current iteration works on.
// Timing: start is sampled at clock edge 0, which loads the array. Edge b+1
// performs the iteration on bit b, so sorted (and the sorted data_out) is
// there right after edge num_bits: one clock per bit after the load clock.
// With num_bits = 0 sorted is high right after the load.
//
// The three stages, the bit-index register and the array fed back from the
// compaction stage follow the published design; the start/busy/sorted
// handshake, the latching of the controls, and the reset are this design's
// choices.
module radix_sorter
  import radix_sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned K = DEFAULT_K,
  localparam int unsigned IW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned NBW = $clog2(K + 1),
  localparam int unsigned W   = $clog2(N + 1),
  localparam int unsigned AW  = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           is_descending,
  input  logic [NBW-1:0] num_bits,
  input  logic [K-1:0]   data_in  [N],
  output logic [K-1:0]   data_out [N],
  output logic           busy,
  output logic           sorted,
  output logic [IW-1:0]  bit_index
);

  sort_state_e    state_q;
  logic [IW-1:0]  bit_q;
  logic [NBW-1:0] nbits_q;
  logic           desc_q;

  logic [K-1:0]   elements  [N];
  logic [N-1:0]   pred;
  logic [W-1:0]   prefix    [N];
  logic [AW-1:0]  addr      [N];
  logic [K-1:0]   reordered [N];

  logic           accept;
  logic [NBW-1:0] nbits_eff;
  logic           last_iter;

  assign accept    = start && (state_q != ST_SORT);
  assign nbits_eff = (32'(num_bits) > K) ? NBW'(K) : num_bits;
  assign last_iter = (32'(bit_q) + 1 >= 32'(nbits_q));

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_IDLE;
      bit_q   <= '0;
      nbits_q <= '0;
      desc_q  <= 1'b0;
    end else begin
      unique case (state_q)
        ST_IDLE, ST_DONE: begin
          if (accept) begin
            bit_q   <= '0;
            nbits_q <= nbits_eff;
            desc_q  <= is_descending;
            state_q <= (nbits_eff == '0) ? ST_DONE : ST_SORT;
          end
        end
        ST_SORT: begin
          if (last_iter) state_q <= ST_DONE;
          else           bit_q   <= bit_q + 1'b1;
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // --------------------------------------------------------------- datapath
  element_array #(.N(N), .K(K)) u_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .load        (accept),
    .load_data   (data_in),
    .update      (state_q == ST_SORT),
    .update_data (reordered),
    .elements    (elements)
  );

  predication #(.N(N), .K(K)) u_predication (
    .elements      (elements),
    .bit_index     (bit_q),
    .is_descending (desc_q),
    .pred          (pred)
  );

  prefix_sum #(.N(N)) u_prefix_sum (
    .pred   (pred),
    .prefix (prefix)
  );

  compaction #(.N(N), .K(K)) u_compaction (
    .elements  (elements),
    .pred      (pred),
    .prefix    (prefix),
    .addr      (addr),
    .reordered (reordered)
  );

  assign data_out  = elements;
  assign busy      = (state_q == ST_SORT);
  assign sorted    = (state_q == ST_DONE);
  assign bit_index = bit_q;

  // ------------------------------------------------------------- assertions
  // While iterating, the bit index stays below the requested bit count.
  a_bit_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_SORT) |-> (32'(bit_q) < 32'(nbits_q)));

  // A sort of n bits ends exactly at its n-th iteration.
  a_sort_ends: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_SORT && last_iter) |=> (state_q == ST_DONE));


  // The compaction addresses of every iteration form a permutation of 0..N-1,
  // so no element is lost or duplicated when the array is rewritten.
  always_ff @(posedge clk) begin
    if (rst_n && state_q == ST_SORT) begin
      logic [N-1:0] hit;
      hit = '0;
      for (int unsigned i = 0; i < N; i++) hit[addr[i]] = 1'b1;
      a_addr_permutation: assert (&hit)
        else $error("compaction addresses are not a permutation");
    end
  end

endmodule
