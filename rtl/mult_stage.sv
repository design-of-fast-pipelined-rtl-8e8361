// mult_stage: one row of the pipelined multiplier, "ADDER-k" with its
// front-end logic and the latch below it.
//
// The front end gates the multiplicand with the multiplier bit B_k that
// reaches this row (AND of every multiplicand bit with B_k), so the
// pipelined adder adds A * B_k to the upper N bits of the partial product that
// left row k-1.  When B_k is 0 the partial product is only shifted.  The
// multiplicand and the product bits already finished by earlier rows travel
// next to the adder through delay lines of the adder's latency, then all go
// through the row's output latch.  At the latch the least significant sum bit
// is a finished product bit P_k; the carry-out and the other N-1 sum bits
// form the upper partial product handed to row k+1, i.e. the partial product
// moves one place right relative to the multiplicand (the same as shifting
// the multiplicand left).
//
// Timing: inputs sampled on a rising edge come out of the row
// ROW_LATENCY = adder latency + 1 clocks later; a new set every clock.
// lo_in/lo_out hold product bits P_1..P_{K-1} / P_1..P_K in their low bits
// (bit 0 = P_1); the bits above are zero.  Reset clears only the valid flag.
module mult_stage
  import cla_pkg::*;
#(
  parameter int unsigned N = 32,  // multiplicand width (adder width)
  parameter int unsigned M = 32,  // multiplier width
  parameter int unsigned B = 2,   // blocking factor of the adder
  parameter int unsigned K = 1    // row number, 1 .. M
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  logic [N-1:0] pp_in,     // upper partial product from row K-1
  input  logic [N-1:0] mcand_in,  // multiplicand A
  input  logic         mbit,      // multiplier bit B_K, already skewed
  input  logic [M-1:0] lo_in,     // finished product bits P_1 .. P_{K-1}
  output logic         valid_out,
  output logic [N-1:0] pp_out,
  output logic [N-1:0] mcand_out,
  output logic [M-1:0] lo_out
);
  localparam int ADD_LAT = adder_latency(N, B);

  logic [N-1:0] addend, sum;
  logic         add_valid, add_cout;
  logic [N-1:0] mcand_d;
  logic [M-1:0] lo_d, lo_next;

  // Front-end logic: partial product generation.
  assign addend = mcand_in & {N{mbit}};

  pipelined_adder #(.N(N), .B(B)) u_adder (
    .clk, .rst_n,
    .valid_in (valid_in),
    .op       (OP_ADD),
    .a        (pp_in),
    .b        (addend),
    .cin      (1'b0),
    .valid_out(add_valid),
    .result   (sum),
    .cout     (add_cout)
  );

  pipe_delay #(.WIDTH(N + M), .DEPTH(ADD_LAT)) u_side_dly (
    .clk, .rst_n,
    .d({mcand_in, lo_in}),
    .q({mcand_d, lo_d})
  );

  always_comb begin
    lo_next      = lo_d;
    lo_next[K-1] = sum[0];
  end

  // Output latch of the row.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= add_valid;
  end

  always_ff @(posedge clk) begin
    pp_out    <= {add_cout, sum[N-1:1]};
    mcand_out <= mcand_d;
    lo_out    <= lo_next;
  end
endmodule
