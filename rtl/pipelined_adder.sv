// pipelined_adder: n-bit carry-look-ahead adder cut into latched stages so
// that a new operand pair can enter on every clock.
//
// The carry-look-ahead tree is laid out as a pipeline, one latch row after
// every level (L = log_B N levels):
//   stage 1        PG   : N/B pg_units give the P and G of every B-bit group
//   stages 2..L-1  BPG  : bpg_units fold B blocks into one, level by level
//   stage L        BG   : bg_unit turns the top B blocks' P/G and the carry-in
//                         into the carry into each top block and the carry-out
//   stages L+1..2L-2 CP : cp_units split each block carry into carries for its
//                         B sub-blocks, using the P/G saved from the way up
//   stage 2L-1     S    : sum_units form the sum bits of each B-bit group by
//                         internal look-ahead from the group carry and a, b
// The operands a and b, the carry-in and the P/G of every level are carried
// down the pipe (pipe_delay) to the stage that needs them.  There is a latch
// after every stage but S, so the result appears LATENCY = 2L-2 clocks after
// the operands, combinationally from the last latch; for N = 32, B = 2 that is
// 8 clocks, with one result per clock once the pipe is full.
//
// Besides addition the unit does the min, max and pass operations of the
// filtering application it was made for.  MIN and MAX feed ~b and a carry-in
// of 1 into the same tree; the carry-out is then a >= b (unsigned) and selects
// a or b at the end.  PASS delivers a.  The operation encoding, the unsigned
// compare, the valid flag that travels with the data, and the reset (of the
// valid flags only) are this design's own choices.
//
// Interface: valid_in/op/a/b/cin are sampled on the rising clock edge;
// valid_out/result/cout belong to the operands sampled LATENCY edges earlier.
// cout is the carry-out of a + b + cin for OP_ADD and OP_PASS, and the
// unsigned a >= b flag for OP_MIN and OP_MAX.
// N must be a power of B, with at least two levels (N >= B*B).
module pipelined_adder
  import cla_pkg::*;
#(
  parameter int unsigned N = 32,  // operand width
  parameter int unsigned B = 2    // blocking factor
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid_in,
  input  op_e          op,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic         valid_out,
  output logic [N-1:0] result,
  output logic         cout
);
  localparam int L       = num_levels(N, B);
  localparam int NG      = N / B;              // number of B-bit groups
  localparam int LATENCY = 2 * L - 2;

  if (L < 2 || ipow(B, L) != int'(N)) begin : g_bad_size
    $error("pipelined_adder: N must be B**L with L >= 2");
  end

  // ---------------------------------------------------------------- stage 1
  logic         is_cmp;
  logic [N-1:0] b_eff;
  logic         cin_eff;
  logic [NG-1:0] p1, g1;

  assign is_cmp  = (op == OP_MIN) || (op == OP_MAX);
  assign b_eff   = is_cmp ? ~b : b;
  assign cin_eff = is_cmp ? 1'b1 : cin;

  for (genvar j = 0; j < NG; j++) begin : g_pg
    pg_unit #(.B(B)) u_pg (
      .a    (a[j*B +: B]),
      .b    (b_eff[j*B +: B]),
      .p_blk(p1[j]),
      .g_blk(g1[j])
    );
  end

  // p_lat[k-1] / g_lat[k-1]: latched P and G of the level-k blocks; the
  // N / B**k low entries are used.
  logic [NG-1:0] p_lat [L-1];
  logic [NG-1:0] g_lat [L-1];
  logic [NG-1:0] p_nx  [L-1];
  logic [NG-1:0] g_nx  [L-1];

  assign p_nx[0] = p1;
  assign g_nx[0] = g1;

  // ------------------------------------------------------- stages 2 .. L-1
  for (genvar k = 2; k <= L - 1; k++) begin : g_bpg_lvl
    localparam int NB = NG / ipow(B, k - 1);   // blocks at level k
    for (genvar i = 0; i < NB; i++) begin : g_bpg
      bpg_unit #(.B(B)) u_bpg (
        .p_in (p_lat[k-2][i*B +: B]),
        .g_in (g_lat[k-2][i*B +: B]),
        .p_blk(p_nx[k-1][i]),
        .g_blk(g_nx[k-1][i])
      );
    end
    if (NB < NG) begin : g_pad
      assign p_nx[k-1][NG-1:NB] = '0;
      assign g_nx[k-1][NG-1:NB] = '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < L - 1; k++) begin
      p_lat[k] <= p_nx[k];
      g_lat[k] <= g_nx[k];
    end
  end

  // ---------------------------------------------------------------- stage L
  logic         cin_d;
  logic [B-1:0] c_top;
  logic         cout_bg, cout_q, cout_d;

  pipe_delay #(.WIDTH(1), .DEPTH(L - 1)) u_cin_dly (
    .clk, .rst_n, .d(cin_eff), .q(cin_d)
  );

  bg_unit #(.B(B)) u_bg (
    .cin  (cin_d),
    .p_in (p_lat[L-2][B-1:0]),
    .g_in (g_lat[L-2][B-1:0]),
    .c_out(c_top),
    .cout (cout_bg)
  );

  // c_lat[k-1]: latched carries into the level-k blocks.
  logic [NG-1:0] c_lat [L-1];
  logic [NG-1:0] c_nx  [L-1];

  if (B < NG) begin : g_top_pad
    assign c_nx[L-2] = {{(NG - B){1'b0}}, c_top};
  end else begin : g_top_full
    assign c_nx[L-2] = c_top;
  end

  always_ff @(posedge clk) cout_q <= cout_bg;

  pipe_delay #(.WIDTH(1), .DEPTH(L - 2)) u_cout_dly (
    .clk, .rst_n, .d(cout_q), .q(cout_d)
  );

  // ------------------------------------------------ stages L+1 .. 2L-2 (CP)
  for (genvar k = L - 1; k >= 2; k--) begin : g_cp_lvl
    localparam int NB  = NG / ipow(B, k - 1);  // blocks at level k
    localparam int NSB = NB * B;               // sub-blocks at level k-1
    logic [NSB-1:0] p_sub, g_sub;

    // P/G of the level-(k-1) blocks, latched at stage k-1, are needed at the
    // latch that closes stage 2L-k-1.
    pipe_delay #(.WIDTH(2 * NSB), .DEPTH(2 * L - 2 * k)) u_pg_dly (
      .clk, .rst_n,
      .d({p_lat[k-2][NSB-1:0], g_lat[k-2][NSB-1:0]}),
      .q({p_sub, g_sub})
    );

    for (genvar i = 0; i < NB; i++) begin : g_cp
      cp_unit #(.B(B)) u_cp (
        .c_blk(c_lat[k-1][i]),
        .p_in (p_sub[i*B +: B]),
        .g_in (g_sub[i*B +: B]),
        .c_out(c_nx[k-2][i*B +: B])
      );
    end
    if (NSB < NG) begin : g_pad
      assign c_nx[k-2][NG-1:NSB] = '0;
    end
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < L - 1; k++) c_lat[k] <= c_nx[k];
  end

  // ----------------------------------------------------------- stage 2L-1
  logic [N-1:0] a_d, b_d;
  op_e          op_d;
  logic [N-1:0] b_eff_d, sum;

  pipe_delay #(.WIDTH(2 * N + 2), .DEPTH(LATENCY)) u_ab_dly (
    .clk, .rst_n,
    .d({a, b, op}),
    .q({a_d, b_d, op_d})
  );

  pipe_delay #(.WIDTH(1), .DEPTH(LATENCY), .RESET(1'b1)) u_valid_dly (
    .clk, .rst_n, .d(valid_in), .q(valid_out)
  );

  assign b_eff_d = ((op_d == OP_MIN) || (op_d == OP_MAX)) ? ~b_d : b_d;

  for (genvar j = 0; j < NG; j++) begin : g_sum
    sum_unit #(.B(B)) u_sum (
      .c_blk(c_lat[0][j]),
      .a    (a_d[j*B +: B]),
      .b    (b_eff_d[j*B +: B]),
      .s    (sum[j*B +: B])
    );
  end

  // cout_d is a >= b for the compare operations.
  always_comb begin
    unique case (op_d)
      OP_ADD:  result = sum;
      OP_MIN:  result = cout_d ? b_d : a_d;
      OP_MAX:  result = cout_d ? a_d : b_d;
      default: result = a_d;   // OP_PASS
    endcase
  end

  assign cout = cout_d;

endmodule
