// bg_unit: block carry generator (BG) at the root of the pipelined adder.
//
// Gets the P and G of the B top-level blocks and the adder's carry-in c0, and
// produces the carry into each block by full look-ahead,
//   c[0] = cin,  c[j] = G_{j-1} | P_{j-1} G_{j-2} | ... | P_{j-1}..P_0 cin,
// plus the carry out of the whole word.  The carries go down to the CP units.
// Purely combinational; the latch after it sits in the adder.
module bg_unit #(
  parameter int unsigned B = 2   // blocking factor
) (
  input  logic         cin,
  input  logic [B-1:0] p_in,
  input  logic [B-1:0] g_in,
  output logic [B-1:0] c_out,    // carry into block j
  output logic         cout      // carry out of the most significant block
);
  always_comb begin
    logic c;
    c = cin;
    for (int j = 0; j < int'(B); j++) begin
      c_out[j] = c;
      c = g_in[j] | (p_in[j] & c);
    end
    cout = c;
  end
endmodule
