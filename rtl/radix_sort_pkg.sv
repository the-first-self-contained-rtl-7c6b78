// radix_sort_pkg: constants and types shared by the parallel radix sorter.
//
// DEFAULT_N is the number of elements sorted in parallel and DEFAULT_K the
// width of each element in bits. The sorter is fully parameterised in both;
// these defaults follow the worked example of eight 3-bit elements used to
// introduce the prefix-sum stage. The controller states are an enum here so
// that the top level and its testbenches share one encoding.
package radix_sort_pkg;

  parameter int unsigned DEFAULT_N = 8;  // elements sorted at once
  parameter int unsigned DEFAULT_K = 3;  // bits per element

  // Controller states: waiting for a start, iterating over bits, result held.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,
    ST_SORT = 2'd1,
    ST_DONE = 2'd2
  } sort_state_e;

endpackage
