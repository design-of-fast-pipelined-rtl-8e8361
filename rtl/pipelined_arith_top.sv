// pipelined_arith_top: the two constant-throughput arithmetic units side by
// side, each with its own ports and a shared clock and reset.
//
//   add_*  : pipelined carry-look-ahead adder with min / max / pass
//            (N bits, blocking factor B, result ADD_LATENCY = 2*log_B(N) - 2
//            clocks after the operands; 8 for the default 32 bits, B = 2)
//   mul_*  : pipelined N x M multiplier made of M such adders
//            (product 1 + M * (ADD_LATENCY + 1) clocks after the operands;
//            289 for the default 32 x 32)
// Both accept one operand set per clock and mark results with a valid flag.
module pipelined_arith_top
  import cla_pkg::*;
#(
  parameter int unsigned N = 32,  // adder width and multiplicand width
  parameter int unsigned M = 32,  // multiplier width
  parameter int unsigned B = 2    // blocking factor
) (
  input  logic           clk,
  input  logic           rst_n,
  // adder
  input  logic           add_valid_in,
  input  op_e            add_op,
  input  logic [N-1:0]   add_a,
  input  logic [N-1:0]   add_b,
  input  logic           add_cin,
  output logic           add_valid_out,
  output logic [N-1:0]   add_result,
  output logic           add_cout,
  // multiplier
  input  logic           mul_valid_in,
  input  logic [N-1:0]   mul_a,
  input  logic [M-1:0]   mul_b,
  output logic           mul_valid_out,
  output logic [N+M-1:0] mul_product
);
  pipelined_adder #(.N(N), .B(B)) u_adder (
    .clk, .rst_n,
    .valid_in (add_valid_in),
    .op       (add_op),
    .a        (add_a),
    .b        (add_b),
    .cin      (add_cin),
    .valid_out(add_valid_out),
    .result   (add_result),
    .cout     (add_cout)
  );

  pipelined_multiplier #(.N(N), .M(M), .B(B)) u_multiplier (
    .clk, .rst_n,
    .valid_in (mul_valid_in),
    .a        (mul_a),
    .b        (mul_b),
    .valid_out(mul_valid_out),
    .product  (mul_product)
  );
endmodule
