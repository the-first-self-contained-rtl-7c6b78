// tb_radix_sorter_wide: end-to-end self-checking test of the radix sorter with 16 elements of 8 bits.
//
// Sorts random arrays with random order flag and bit count and checks:
//   * after every iteration, the array equals a stable partition of the
//     previous array on the current bit, worked out here;
//   * at the end, data_out equals the input stably sorted, in the requested
//     order, on its num_bits least significant bits;
//   * the sort takes exactly num_bits clocks after the load clock, busy is
//     high for exactly those clocks and bit_index counts 0, 1, ...;
//   * sorted stays high and data_out holds until the next start.
// It also counts each mechanism of the design and fails if one never occurs:
// ascending and descending sorts, full-width and partial bit counts, a zero
// bit count, a bit count above K being clamped (when the port can express
// one), a start while busy being ignored, and a restart from the sorted state.
module tb_radix_sorter_wide;
  import radix_sort_pkg::*;

  localparam int unsigned N   = 16;
  localparam int unsigned K   = 8;
  localparam int unsigned NBW = $clog2(K + 1);
  localparam int unsigned IW  = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned RUNS = 400;
  localparam bit CAN_CLAMP = ((1 << NBW) - 1) > K;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           start;
  logic           is_descending;
  logic [NBW-1:0] num_bits;
  logic [K-1:0]   data_in  [N];
  logic [K-1:0]   data_out [N];
  logic           busy, sorted;
  logic [IW-1:0]  bit_index;

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_asc = 0, n_desc = 0, n_full = 0, n_partial = 0, n_zero = 0;
  int n_clamp = 0, n_ignored_start = 0, n_restart = 0;

  radix_sorter #(.N(N), .K(K)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 16200) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic void check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  // Stable partition of v on bit b: elements whose bit equals desc first.
  function automatic void partition(ref logic [K-1:0] v [N], input int b, input bit desc);
    logic [K-1:0] q [$];
    q = {};
    for (int i = 0; i < N; i++) if (v[i][b] == desc) q.push_back(v[i]);
    for (int i = 0; i < N; i++) if (v[i][b] != desc) q.push_back(v[i]);
    for (int i = 0; i < N; i++) v[i] = q[i];
  endfunction

  // Reference result: stable insertion sort on the key v & mask.
  function automatic void ref_sort(ref logic [K-1:0] v [N], input int nb, input bit desc);
    logic [K-1:0] mask;
    mask = (nb >= K) ? '1 : K'((1 << nb) - 1);
    for (int i = 1; i < N; i++) begin
      logic [K-1:0] x;
      int j;
      x = v[i];
      j = i - 1;
      while (j >= 0 && (desc ? ((v[j] & mask) < (x & mask))
                             : ((v[j] & mask) > (x & mask)))) begin
        v[j+1] = v[j];
        j--;
      end
      v[j+1] = x;
    end
  endfunction

  task automatic run_sort(input logic [K-1:0] vals [N], input bit desc, input int nb_req,
                          input bit poke_busy);
    logic [K-1:0] model [N];
    logic [K-1:0] expect_out [N];
    int nb, lat;
    bit poked;

    nb = (nb_req > K) ? K : nb_req;
    if (sorted) n_restart++;
    if (desc) n_desc++; else n_asc++;
    if (nb_req == 0) n_zero++;
    else if (nb_req > K) n_clamp++;
    else if (nb_req == K) n_full++;
    else n_partial++;

    data_in       = vals;
    is_descending = desc;
    num_bits      = NBW'(nb_req);
    start         = 1'b1;
    @(negedge clk);                       // load clock has passed
    start = 1'b0;
    for (int i = 0; i < N; i++) data_in[i] = K'($urandom);  // must not matter now
    model = vals;
    check(data_out == vals, "array not loaded");
    lat   = 0;
    poked = 1'b0;
    while (!sorted && lat <= K + 2) begin
      check(busy, "busy low while iterating");
      check(int'(bit_index) == lat, $sformatf("bit_index %0d, expected %0d", bit_index, lat));
      if (poke_busy && !poked && lat == nb - 1) begin
        start         = 1'b1;             // must be ignored while busy
        is_descending = ~desc;
        num_bits      = '0;
        poked         = 1'b1;
        n_ignored_start++;
      end
      @(negedge clk);
      start = 1'b0;
      partition(model, lat, desc);
      check(data_out == model, $sformatf("array wrong after iteration on bit %0d", lat));
      lat++;
    end
    check(sorted, "sort did not finish");
    check(!busy, "busy still high when sorted");
    check(lat == nb, $sformatf("latency %0d clocks, expected %0d", lat, nb));
    expect_out = vals;
    ref_sort(expect_out, nb, desc);
    for (int i = 0; i < N; i++)
      check(data_out[i] == expect_out[i],
            $sformatf("out[%0d]=%0d expected %0d (desc=%0d nb=%0d)",
                      i, data_out[i], expect_out[i], desc, nb));
    repeat (2) @(negedge clk);
    check(sorted && data_out == expect_out, "result not held");
  endtask

  initial begin
    logic [K-1:0] v [N];
    rst_n = 1'b0;
    start = 1'b0;
    is_descending = 1'b0;
    num_bits = '0;
    for (int i = 0; i < N; i++) data_in[i] = '0;
    repeat (2) @(negedge clk);
    check(!busy && !sorted, "state after reset");
    rst_n = 1'b1;
    @(negedge clk);

    for (int r = 0; r < RUNS; r++) begin
      int nb;
      for (int i = 0; i < N; i++) v[i] = K'($urandom);
      case (r % 6)
        0:       nb = K;
        1:       nb = 0;
        2:       nb = CAN_CLAMP ? int'($urandom_range(K + 1, (1 << NBW) - 1)) : K;
        default: nb = int'($urandom_range(1, K));
      endcase
      run_sort(v, 1'($urandom), nb, (r % 5) == 3 && nb > 0);
      if ((r % 7) == 4) repeat (3) @(negedge clk);
    end

    $display("mechanisms: asc=%0d desc=%0d full=%0d partial=%0d zero=%0d clamp=%0d ignored_start=%0d restart=%0d",
             n_asc, n_desc, n_full, n_partial, n_zero, n_clamp, n_ignored_start, n_restart);
    check(n_asc > 0, "no ascending sort");
    check(n_desc > 0, "no descending sort");
    check(n_full > 0, "no full-width sort");
    check(K == 1 || n_partial > 0, "no partial bit count");
    check(n_zero > 0, "no zero bit count");
    check(!CAN_CLAMP || n_clamp > 0, "no clamped bit count");
    check(n_ignored_start > 0, "no start while busy");
    check(n_restart > 0, "no restart from sorted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
