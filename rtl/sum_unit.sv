// sum_unit: last stage (S) of the pipelined adder.
//
// Gets the carry into a B-bit group and the group's operand bits, which were
// carried down the pipe, re-forms the bit p_i and g_i, generates the carry into
// every bit by internal look-ahead and forms s_i = a_i ^ b_i ^ c_{i-1}.
// Purely combinational; there is no latch after it in the adder.
module sum_unit #(
  parameter int unsigned B = 2   // blocking factor
) (
  input  logic         c_blk,    // carry into bit 0 of the group
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  output logic [B-1:0] s
);
  logic [B-1:0] p, g, c;

  assign p = a | b;
  assign g = a & b;

  // c[i] is the carry into bit i, expanded as a look-ahead sum of products.
  always_comb begin
    for (int i = 0; i < int'(B); i++) begin
      logic term;
      term = c_blk;
      for (int j = 0; j < i; j++) term = term & p[j];
      c[i] = term;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
    end
  end

  assign s = a ^ b ^ c;
endmodule
