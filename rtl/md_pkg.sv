// md_pkg: elaboration-time bookkeeping for the Matrix-Diagonal multiplier.
//
// The multiplier sums an N x N matrix of AND nodes along its diagonals.
// Diagonal k (weight 2^k) holds pp_count(n,k) AND outputs and receives
// cin_count(n,k) carries stacked in from diagonal k-1. Each diagonal stage
// is a chain of half adders, so a stage with m input bits has m-1 summing
// nodes and sends m-1 carries to the next stage. These functions compute
// those counts so the top can size and wire its stages with generate loops.
// The counting rule follows from the half-adder-only structure; nothing here
// is hardware.
package md_pkg;

  // Number of matrix nodes (i,j), 0 <= i,j < n, with i + j == k.
  function automatic int pp_count(input int n, input int k);
    int lo, hi;
    if (k < 0 || k > 2 * n - 2) return 0;
    lo = (k - n + 1 > 0) ? k - n + 1 : 0;
    hi = (k < n - 1) ? k : n - 1;
    return hi - lo + 1;
  endfunction

  // Row index of the first node of diagonal k (the node with the smallest i).
  function automatic int pp_first_row(input int n, input int k);
    return (k - n + 1 > 0) ? k - n + 1 : 0;
  endfunction

  // Number of carries stacked into diagonal k from diagonal k-1.
  function automatic int cin_count(input int n, input int k);
    int c, m;
    c = 0;
    for (int d = 0; d < k; d++) begin
      m = pp_count(n, d) + c;     // input bits of stage d
      c = (m > 1) ? m - 1 : 0;    // one carry per half adder of stage d
    end
    return c;
  endfunction

  // Input bits of diagonal stage k.
  function automatic int stage_inputs(input int n, input int k);
    return pp_count(n, k) + cin_count(n, k);
  endfunction

  // Largest number of carries passed between any two stages of an n x n array.
  function automatic int max_carries(input int n);
    int mx;
    mx = 1;
    for (int k = 0; k <= 2 * n; k++)
      if (cin_count(n, k) > mx) mx = cin_count(n, k);
    return mx;
  endfunction

  // Total half adders in an n x n array (stages 0 .. 2n-1).
  function automatic int ha_count(input int n);
    int t;
    t = 0;
    for (int k = 0; k < 2 * n; k++)
      if (stage_inputs(n, k) > 1) t += stage_inputs(n, k) - 1;
    return t;
  endfunction

endpackage
