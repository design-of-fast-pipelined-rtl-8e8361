// tb_pipelined_arith_top: end-to-end test of both units at their default
// sizes (32-bit adder with blocking factor 2, 32 x 32 multiplier).
//
// Both units get independent random streams at the same time.  Every adder
// result and every product is compared with integer arithmetic, and its
// latency with 8 and 289 clocks.  The test counts how often each mechanism
// occurred and fails if one never did:
//   ADD, MIN picking a, MIN picking b, MAX picking a, MAX picking b, PASS,
//   an addition with carry-out, a carry that ripples through all 32 bits,
//   a bubble (idle clock) inside a stream of each unit, back-to-back results
//   (one per clock) from each unit, and a multiplier-bit value of 0 (row only
//   shifts) and of 1 (row adds) in products.
module tb_pipelined_arith_top
  import cla_pkg::*;
;
  localparam int N = 32, M = 32;
  localparam int ADD_LAT = 8, MUL_LAT = 289;
  localparam int NUM_ADD = 3000, NUM_MUL = 1500;

  typedef struct {
    logic [N-1:0] res;
    logic         co;
    longint       t_in;
  } add_exp_t;

  typedef struct {
    logic [N+M-1:0] p;
    longint         t_in;
  } mul_exp_t;

  typedef enum int {
    EV_ADD, EV_MIN_A, EV_MIN_B, EV_MAX_A, EV_MAX_B, EV_PASS, EV_CARRY_OUT,
    EV_FULL_CHAIN, EV_ADD_BUBBLE, EV_MUL_BUBBLE, EV_ADD_B2B, EV_MUL_B2B,
    EV_MBIT_ZERO, EV_MBIT_ONE, EV_COUNT
  } ev_e;

  logic           clk = 1'b0;
  logic           rst_n = 1'b0;
  logic           add_valid_in, add_cin, add_valid_out, add_cout;
  op_e            add_op;
  logic [N-1:0]   add_a, add_b, add_result;
  logic           mul_valid_in, mul_valid_out;
  logic [N-1:0]   mul_a;
  logic [M-1:0]   mul_b;
  logic [N+M-1:0] mul_product;

  add_exp_t add_q[$];
  mul_exp_t mul_q[$];
  longint   cycle = 0;
  int       ev [EV_COUNT];
  int       checks = 0, failures = 0;
  int       add_sent = 0, mul_sent = 0;
  logic     add_done = 1'b0, mul_done = 1'b0;
  logic     add_prev_out = 1'b0, mul_prev_out = 1'b0;
  logic     add_prev_in = 1'b0, mul_prev_in = 1'b0;

  always #5 clk = ~clk;

  pipelined_arith_top dut (
    .clk, .rst_n,
    .add_valid_in, .add_op, .add_a, .add_b, .add_cin,
    .add_valid_out, .add_result, .add_cout,
    .mul_valid_in, .mul_a, .mul_b, .mul_valid_out, .mul_product
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Adder stream.
  initial begin
    add_valid_in = 1'b0; add_op = OP_ADD; add_a = '0; add_b = '0; add_cin = 1'b0;
    @(posedge rst_n);
    while (add_sent < NUM_ADD) begin
      @(negedge clk);
      add_valid_in = ($urandom_range(0, 9) != 0);
      add_op  = op_e'($urandom_range(0, 3));
      add_a   = $urandom;
      add_b   = $urandom;
      add_cin = 1'($urandom);
      if ($urandom_range(0, 19) == 0) begin
        add_op = OP_ADD; add_a = '1; add_b = '0; add_cin = 1'b1;
      end
      if (add_valid_in) add_sent++;
    end
    @(negedge clk);
    add_valid_in = 1'b0;
    repeat (ADD_LAT + 3) @(negedge clk);
    add_done = 1'b1;
  end

  // Multiplier stream.
  initial begin
    mul_valid_in = 1'b0; mul_a = '0; mul_b = '0;
    @(posedge rst_n);
    while (mul_sent < NUM_MUL) begin
      @(negedge clk);
      mul_valid_in = ($urandom_range(0, 9) != 0);
      mul_a = $urandom;
      mul_b = $urandom;
      if ($urandom_range(0, 9) == 0) begin
        mul_a = '1; mul_b = '1;
      end
      if (mul_valid_in) mul_sent++;
    end
    @(negedge clk);
    mul_valid_in = 1'b0;
    repeat (MUL_LAT + 3) @(negedge clk);
    mul_done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      add_prev_in <= add_valid_in;
      mul_prev_in <= mul_valid_in;
      add_prev_out <= add_valid_out;
      mul_prev_out <= mul_valid_out;

      if (add_valid_in) begin
        add_exp_t e;
        logic [N:0] s;
        s = {1'b0, add_a} + {1'b0, add_b} + (N+1)'(add_cin);
        e.t_in = cycle;
        case (add_op)
          OP_ADD: begin
            e.res = s[N-1:0]; e.co = s[N];
            ev[EV_ADD]++;
            if (s[N]) ev[EV_CARRY_OUT]++;
            if (add_a == '1 && add_cin) ev[EV_FULL_CHAIN]++;
          end
          OP_MIN: begin
            e.res = (add_a < add_b) ? add_a : add_b; e.co = add_a >= add_b;
            if (add_a < add_b) ev[EV_MIN_A]++; else ev[EV_MIN_B]++;
          end
          OP_MAX: begin
            e.res = (add_a < add_b) ? add_b : add_a; e.co = add_a >= add_b;
            if (add_a < add_b) ev[EV_MAX_B]++; else ev[EV_MAX_A]++;
          end
          default: begin
            e.res = add_a; e.co = s[N];
            ev[EV_PASS]++;
          end
        endcase
        if (!add_prev_in && add_sent > 1) ev[EV_ADD_BUBBLE]++;
        add_q.push_back(e);
      end

      if (mul_valid_in) begin
        mul_exp_t e;
        e.p = (N+M)'(mul_a) * (N+M)'(mul_b);
        e.t_in = cycle;
        if (mul_b != '1) ev[EV_MBIT_ZERO]++;
        if (mul_b != '0) ev[EV_MBIT_ONE]++;
        if (!mul_prev_in && mul_sent > 1) ev[EV_MUL_BUBBLE]++;
        mul_q.push_back(e);
      end

      if (add_valid_out) begin
        checks++;
        if (add_prev_out) ev[EV_ADD_B2B]++;
        if (add_q.size() == 0) begin
          failures++;
          $display("adder: unexpected result");
        end else begin
          add_exp_t e;
          e = add_q.pop_front();
          if (add_result !== e.res || add_cout !== e.co ||
              cycle - e.t_in != ADD_LAT) begin
            failures++;
            $display("adder: %h/%b after %0d, expected %h/%b", add_result,
                     add_cout, cycle - e.t_in, e.res, e.co);
          end
        end
      end

      if (mul_valid_out) begin
        checks++;
        if (mul_prev_out) ev[EV_MUL_B2B]++;
        if (mul_q.size() == 0) begin
          failures++;
          $display("multiplier: unexpected product");
        end else begin
          mul_exp_t e;
          e = mul_q.pop_front();
          if (mul_product !== e.p || cycle - e.t_in != MUL_LAT) begin
            failures++;
            $display("multiplier: %h after %0d, expected %h", mul_product,
                     cycle - e.t_in, e.p);
          end
        end
      end
    end
  end

  initial begin
    foreach (ev[i]) ev[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (add_done && mul_done);
    checks += 2;
    if (add_q.size() != 0) failures++;
    if (mul_q.size() != 0) failures++;
    for (int i = 0; i < int'(EV_COUNT); i++) begin
      ev_e e;
      e = ev_e'(i);
      checks++;
      $display("%-14s %0d", e.name(), ev[i]);
      if (ev[i] == 0) begin
        failures++;
        $display("mechanism %s never happened", e.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
