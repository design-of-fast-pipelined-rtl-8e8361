// pg_unit: first stage of the pipelined adder (PG).
//
// Takes B bit pairs a[i], b[i] and forms the bit generate g_i = a_i & b_i and
// propagate p_i = a_i | b_i, then folds them into one block propagate and
// generate for the B-bit group, so that stage 1 hands n/B P and G signals to
// the next latch:
//   P = p_{B-1} & ... & p_0
//   G = g_{B-1} | p_{B-1} g_{B-2} | ... | p_{B-1}..p_1 g_0
// The bit equations (OR propagate) are the ones the adder is built on; folding
// B bits per PG unit follows the signal count "(n/B) Ps + (n/B) Gs carried from
// stage 1".  Purely combinational; the latch after it sits in the adder.
module pg_unit #(
  parameter int unsigned B = 2   // blocking factor
) (
  input  logic [B-1:0] a,
  input  logic [B-1:0] b,
  output logic         p_blk,
  output logic         g_blk
);
  logic [B-1:0] p, g;

  assign p = a | b;
  assign g = a & b;

  always_comb begin
    p_blk = 1'b1;
    g_blk = 1'b0;
    for (int i = 0; i < int'(B); i++) begin
      g_blk = g[i] | (p[i] & g_blk);
      p_blk = p_blk & p[i];
    end
  end
endmodule
