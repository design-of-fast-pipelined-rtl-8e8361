// pipelined_multiplier: unsigned N x M multiplier built as a column of M
// pipelined adders, one per multiplier bit, that accepts a new operand pair
// every clock.
//
// An input latch takes the multiplicand A and multiplier B.  Row k
// (mult_stage) adds A * B_k to the running partial product, so after row M
// the full N+M bit product is present.  Because a row needs D = adder latency
// + 1 clocks, multiplier bit B_k is held back by (k-1)*D clocks (skew
// buffers "D, 2D, ..., (m-1)D") so that it meets its operand pair at row k.
// The first row adds to a zero partial product.
//
// Timing: the product of operands sampled on a rising edge appears
// LATENCY = 1 + M * D clocks later, with valid_out; after that one product per
// clock.  For N = M = 32 and blocking factor 2, D = 9 and LATENCY = 289.
// Stalls are bubbles: a clock with valid_in low just leaves a hole, nothing
// needs flushing.  Unsigned operands, the valid flag and the reset of the
// valid flags only are this design's own choices.
module pipelined_multiplier
  import cla_pkg::*;
#(
  parameter int unsigned N = 32,  // multiplicand width
  parameter int unsigned M = 32,  // multiplier width = number of adder rows
  parameter int unsigned B = 2    // blocking factor of each adder
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid_in,
  input  logic [N-1:0]   a,        // multiplicand
  input  logic [M-1:0]   b,        // multiplier
  output logic           valid_out,
  output logic [N+M-1:0] product
);
  localparam int D = adder_latency(N, B) + 1;  // clocks per row

  // Input latch.
  logic         valid_q;
  logic [N-1:0] a_q;
  logic [M-1:0] b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= valid_in;
  end

  always_ff @(posedge clk) begin
    a_q <= a;
    b_q <= b;
  end

  // Row interconnect: index k-1 feeds row k, index k leaves it.
  logic         row_valid [M+1];
  logic [N-1:0] row_pp    [M+1];
  logic [N-1:0] row_mcand [M+1];
  logic [M-1:0] row_lo    [M+1];

  assign row_valid[0] = valid_q;
  assign row_pp[0]    = '0;
  assign row_mcand[0] = a_q;
  assign row_lo[0]    = '0;

  for (genvar k = 1; k <= M; k++) begin : g_row
    logic mbit_skewed;

    // Skew buffer (k-1)*D for multiplier bit B_k.
    pipe_delay #(.WIDTH(1), .DEPTH((k - 1) * D)) u_skew (
      .clk, .rst_n, .d(b_q[k-1]), .q(mbit_skewed)
    );

    mult_stage #(.N(N), .M(M), .B(B), .K(k)) u_row (
      .clk, .rst_n,
      .valid_in (row_valid[k-1]),
      .pp_in    (row_pp[k-1]),
      .mcand_in (row_mcand[k-1]),
      .mbit     (mbit_skewed),
      .lo_in    (row_lo[k-1]),
      .valid_out(row_valid[k]),
      .pp_out   (row_pp[k]),
      .mcand_out(row_mcand[k]),
      .lo_out   (row_lo[k])
    );
  end

  assign valid_out = row_valid[M];
  assign product   = {row_pp[M], row_lo[M]};
endmodule
