// cp_unit: carry propagation unit (CP) of the pipelined adder.
//
// Takes the carry into one block and the P and G of its B sub-blocks (saved
// from the BPG level that made them) and produces the carry into each
// sub-block:
//   c[0] = c_blk,  c[j] = G_{j-1} | P_{j-1} G_{j-2} | ... | P_{j-1}..P_0 c_blk.
// One row per tree level on the way back down; each row is followed by a latch
// in the adder, so for every P/G pair used one carry comes out and the data
// path narrows.  Purely combinational.
module cp_unit #(
  parameter int unsigned B = 2   // blocking factor
) (
  input  logic         c_blk,    // carry into the whole block
  input  logic [B-1:0] p_in,     // sub-block propagates
  input  logic [B-1:0] g_in,     // sub-block generates
  output logic [B-1:0] c_out     // carry into sub-block j
);
  always_comb begin
    logic c;
    c = c_blk;
    for (int j = 0; j < int'(B); j++) begin
      c_out[j] = c;
      c = g_in[j] | (p_in[j] & c);
    end
  end
endmodule
