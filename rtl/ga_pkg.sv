// ga_pkg: helpers shared by the GA pipeline modules.
//
// The fitness comparison is the only problem-dependent rule the shared
// blocks (management, crossover bookkeeping, result monitor) need: the
// Knapsack fitness is maximised (total value), the TSP fitness is minimised
// (tour length). `fit_better` returns 1 when `a` is strictly better than `b`
// under the given direction. `rand_below(r, n)` scales a 16-bit random
// number r to [0, n) as (r*n)>>16. Both are this design's own; the
// replacement rule they serve follows the document.
package ga_pkg;

  function automatic logic fit_better(input logic [31:0] a, input logic [31:0] b,
                                      input logic minimize);
    return minimize ? (a < b) : (a > b);
  endfunction

  // Scale a 16-bit uniform random number to the range [0, n-1].
  function automatic logic [15:0] rand_below(input logic [15:0] r, input logic [15:0] n);
    logic [31:0] p;
    p = 32'(r) * 32'(n);
    return p[31:16];
  endfunction

endpackage
