// adder_stream_check: drives one pipelined_adder with a random stream of
// operations (random ops, operands, carry-ins and bubbles, plus full-length
// carry chains and equal operands) and checks every result against
// N+1 bit arithmetic, and that each result appears exactly
// 2*log_B(N) - 2 clocks after its operands.  Used by the adder testbench for
// several widths and blocking factors.
module adder_stream_check
  import cla_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter int unsigned B      = 2,
  parameter int unsigned NUM_OPS = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LAT = 2 * num_levels(N, B) - 2;

  typedef struct {
    logic [N-1:0] res;
    logic         co;
    longint       t_in;
  } exp_t;

  logic         valid_in, valid_out, cin, cout;
  op_e          op;
  logic [N-1:0] a, b, result;
  exp_t         q[$];
  longint       cycle;
  int           sent;

  pipelined_adder #(.N(N), .B(B)) dut (
    .clk, .rst_n, .valid_in, .op, .a, .b, .cin, .valid_out, .result, .cout
  );

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int i = 0; i < int'(N); i += 32) r = {r, 32'($urandom)};
    return r;
  endfunction

  function automatic exp_t model(input op_e o, input logic [N-1:0] x,
                                 input logic [N-1:0] y, input logic c);
    exp_t e;
    logic [N:0] s;
    s = {1'b0, x} + {1'b0, y} + (N+1)'(c);
    case (o)
      OP_ADD:  begin e.res = s[N-1:0];         e.co = s[N];    end
      OP_MIN:  begin e.res = (x < y) ? x : y;  e.co = x >= y;  end
      OP_MAX:  begin e.res = (x < y) ? y : x;  e.co = x >= y;  end
      default: begin e.res = x;                e.co = s[N];    end
    endcase
    return e;
  endfunction

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    valid_in = 1'b0;
    op       = OP_ADD;
    a        = '0;
    b        = '0;
    cin      = 1'b0;
    sent     = 0;
    cycle    = 0;
    @(posedge rst_n);
    while (sent < int'(NUM_OPS)) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 7) != 0);
      op       = op_e'($urandom_range(0, 3));
      a        = rnd();
      b        = rnd();
      cin      = 1'($urandom);
      case ($urandom_range(0, 9))
        0: begin a = '1; b = N'(1); op = OP_ADD; end      // full carry chain
        1: begin a = '1; b = '0; cin = 1'b1; op = OP_ADD; end
        2: b = a;                                         // equal operands
        3: b = a ^ N'(1);                                 // differ in the lsb
        default: ;
      endcase
      if (valid_in) sent++;
    end
    @(negedge clk);
    valid_in = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("N=%0d B=%0d: %0d results never came out", N, B, q.size());
    end
    done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (valid_in) begin
        exp_t e;
        e = model(op, a, b, cin);
        e.t_in = cycle;
        q.push_back(e);
      end
      if (valid_out) begin
        if (q.size() == 0) begin
          checks++;
          failures++;
          $display("N=%0d B=%0d: unexpected result", N, B);
        end else begin
          exp_t e;
          e = q.pop_front();
          checks += 2;
          if (result !== e.res || cout !== e.co) begin
            failures++;
            $display("N=%0d B=%0d: result %h cout %b, expected %h %b", N, B,
                     result, cout, e.res, e.co);
          end
          if (cycle - e.t_in != longint'(LAT)) begin
            failures++;
            $display("N=%0d B=%0d: latency %0d, expected %0d", N, B,
                     cycle - e.t_in, LAT);
          end
        end
      end
    end
  end
endmodule
