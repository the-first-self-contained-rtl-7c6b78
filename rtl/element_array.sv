// element_array: the register array holding the numbers being sorted.
//
// N registers of K bits. A load writes the parallel input (the numbers
// arriving from the pins); otherwise an update writes the reordered elements
// produced by the compaction stage of the current iteration; otherwise the
// array holds. Load takes priority over update. The array contents are always
// visible on `elements`, which feeds both the sorting datapath and the
// parallel output (the fully sorted numbers once the sort has finished).
//
// Interface: clk, active-low asynchronous reset rst_n (clears the array),
// load/load_data, update/update_data, elements. One clock per write.
// The array and its two sources are the published structure; the reset,
// the priority and the enable signals are this design's choices.
module element_array #(
  parameter int unsigned N = radix_sort_pkg::DEFAULT_N,
  parameter int unsigned K = radix_sort_pkg::DEFAULT_K
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [K-1:0] load_data   [N],
  input  logic         update,
  input  logic [K-1:0] update_data [N],
  output logic [K-1:0] elements    [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++) elements[i] <= '0;
    end else if (load) begin
      elements <= load_data;
    end else if (update) begin
      elements <= update_data;
    end
  end

endmodule
