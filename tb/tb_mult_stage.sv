// tb_mult_stage: checks one multiplier row (row 5 of a 32 x 32 multiplier,
// 32-bit adder with blocking factor 2).  For a random stream with bubbles it
// compares, 9 clocks after the inputs, the new upper partial product
// ((pp + (B_k ? A : 0)) >> 1), the finished product bit placed at bit 4 of
// the low product bits, and the forwarded multiplicand.
module tb_mult_stage;
  localparam int N = 32, M = 32, K = 5;
  localparam int LAT = 9;   // adder latency 8 + row latch

  typedef struct {
    logic [N-1:0] pp;
    logic [N-1:0] mc;
    logic [M-1:0] lo;
    longint       t_in;
  } exp_t;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         valid_in, mbit, valid_out;
  logic [N-1:0] pp_in, mcand_in, pp_out, mcand_out;
  logic [M-1:0] lo_in, lo_out;
  exp_t         q[$];
  longint       cycle = 0;
  int           sent = 0, ones = 0, zeros = 0;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_stage #(.N(N), .M(M), .B(2), .K(K)) dut (
    .clk, .rst_n, .valid_in, .pp_in, .mcand_in, .mbit, .lo_in,
    .valid_out, .pp_out, .mcand_out, .lo_out
  );

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid_in = 1'b0;
    pp_in = '0; mcand_in = '0; mbit = 1'b0; lo_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (sent < 1000) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 5) != 0);
      pp_in    = $urandom;
      mcand_in = $urandom;
      mbit     = 1'($urandom);
      lo_in    = M'($urandom) & M'((1 << (K - 1)) - 1);
      if (valid_in) begin
        sent++;
        if (mbit) ones++; else zeros++;
      end
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (LAT + 3) @(negedge clk);
    checks += 3;
    if (q.size() != 0) failures++;
    if (ones == 0) failures++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (valid_in) begin
        exp_t e;
        logic [N:0] s;
        s = {1'b0, pp_in} + {1'b0, (mbit ? mcand_in : N'(0))};
        e.pp = s[N:1];
        e.mc = mcand_in;
        e.lo = lo_in | (M'(s[0]) << (K - 1));
        e.t_in = cycle;
        q.push_back(e);
      end
      if (valid_out) begin
        exp_t e;
        checks++;
        if (q.size() == 0) begin
          failures++;
        end else begin
          e = q.pop_front();
          checks += 3;
          if (pp_out !== e.pp || lo_out !== e.lo || mcand_out !== e.mc) begin
            failures++;
            $display("pp %h lo %h mc %h, expected %h %h %h", pp_out, lo_out,
                     mcand_out, e.pp, e.lo, e.mc);
          end
          if (cycle - e.t_in != LAT) begin
            failures++;
            $display("latency %0d", cycle - e.t_in);
          end
        end
      end
    end
  end
endmodule
