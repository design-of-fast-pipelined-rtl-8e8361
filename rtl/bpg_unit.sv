// bpg_unit: block propagate/generate unit (BPG) of the pipelined adder.
//
// Combines the P and G of B adjacent blocks (index 0 is the least significant)
// into the P and G of the block that spans them:
//   P = P_{B-1} & ... & P_0
//   G = G_{B-1} | P_{B-1} G_{B-2} | ... | P_{B-1}..P_1 G_0
// One row of these units per tree level; each row is followed by a latch in
// the adder.  Purely combinational.
module bpg_unit #(
  parameter int unsigned B = 2   // blocking factor
) (
  input  logic [B-1:0] p_in,
  input  logic [B-1:0] g_in,
  output logic         p_blk,
  output logic         g_blk
);
  always_comb begin
    p_blk = 1'b1;
    g_blk = 1'b0;
    for (int i = 0; i < int'(B); i++) begin
      g_blk = g_in[i] | (p_in[i] & g_blk);
      p_blk = p_blk & p_in[i];
    end
  end
endmodule
