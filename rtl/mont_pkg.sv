// Shared types and elaboration-time helpers for the parametric Montgomery
// multiplier, exponentiator and Rabin-Miller prime tester.
//
// The helper functions split the n Montgomery iterations over the pipeline
// blocks the way the design prescribes: the first (n mod p) blocks perform
// floor(n/p)+1 iterations, the remaining blocks floor(n/p). Each block needs
// ceil(iters/r) clock cycles in its RUNNING state when it holds r replicated
// carry-save adders.
package mont_pkg;

  // State of one Montgomery cell (pipeline block).
  typedef enum logic [1:0] {
    CELL_IDLE     = 2'd0,
    CELL_LOADING  = 2'd1,
    CELL_RUNNING  = 2'd2,
    CELL_FINISHED = 2'd3
  } cell_state_e;

  // Number of iterations performed by pipeline block k (0-based).
  function automatic int block_iters(input int n, input int p, input int k);
    return n / p + ((k < (n % p)) ? 1 : 0);
  endfunction

  // Index of the first bit of operand A used by pipeline block k.
  function automatic int block_offset(input int n, input int p, input int k);
    return k * (n / p) + ((k < (n % p)) ? k : (n % p));
  endfunction

  // Clock cycles spent in RUNNING by a block performing iters iterations.
  function automatic int run_cycles(input int iters, input int r);
    return (iters + r - 1) / r;
  endfunction

  // Latency in clock cycles from the start of the first block to the done
  // pulse of the last block (cycle model of the pipeline, Eq. L_mult).
  function automatic int mult_core_latency(input int n, input int p, input int r);
    int acc;
    acc = p - 1;
    for (int k = 0; k < p; k++) acc += run_cycles(block_iters(n, p, k), r) + 2;
    return acc;
  endfunction

  // Width of a counter able to hold the value v.
  function automatic int cnt_width(input int v);
    return (v < 2) ? 1 : $clog2(v + 1);
  endfunction

endpackage
