// cla_pkg: types and helper functions shared by the pipelined carry-look-ahead
// adder and the pipelined multiplier.
//
// op_e selects what the adder delivers at its output.  The adder always runs
// the same carry-look-ahead pipeline; MIN and MAX reuse it as a comparator
// (a + ~b + 1, whose carry-out means a >= b), PASS forwards operand a.  The
// encoding is this design's own choice.
//
// num_levels(n, b) is the number of look-ahead levels L with b**L == n: level k
// of the tree holds n / b**k blocks of b**k bits each.  The adder's latency is
// 2*L - 2 clocks.
package cla_pkg;

  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,  // result = a + b + cin, cout = carry-out
    OP_MIN  = 2'd1,  // result = min(a, b), unsigned
    OP_MAX  = 2'd2,  // result = max(a, b), unsigned
    OP_PASS = 2'd3   // result = a
  } op_e;

  // Number of levels of a radix-b tree over n leaves (n must be a power of b).
  function automatic int num_levels(input int n, input int b);
    int l;
    int s;
    l = 0;
    s = 1;
    while (s < n) begin
      s = s * b;
      l = l + 1;
    end
    return l;
  endfunction

  // b**k for small non-negative k.
  function automatic int ipow(input int b, input int k);
    int r;
    r = 1;
    for (int i = 0; i < k; i++) r = r * b;
    return r;
  endfunction

  // Latency in clocks of the pipelined adder: one latch after each of the
  // 2*L - 1 stages except the last (the S stage).
  function automatic int adder_latency(input int n, input int b);
    return 2 * num_levels(n, b) - 2;
  endfunction

endpackage
