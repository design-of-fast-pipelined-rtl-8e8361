// mult_stream_check: drives one pipelined_multiplier with a random stream of
// operand pairs (with bubbles and corner values: zero, all ones, single bits)
// and checks every product against integer multiplication, and that it
// appears exactly 1 + M * (2*log_B(N) - 1) clocks after its operands.
module mult_stream_check
  import cla_pkg::*;
#(
  parameter int unsigned N       = 32,
  parameter int unsigned M       = 32,
  parameter int unsigned B       = 2,
  parameter int unsigned NUM_OPS = 500
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int LAT = 1 + M * (2 * num_levels(N, B) - 1);

  typedef struct {
    logic [N+M-1:0] p;
    longint         t_in;
  } exp_t;

  logic           valid_in, valid_out;
  logic [N-1:0]   a;
  logic [M-1:0]   b;
  logic [N+M-1:0] product;
  exp_t           q[$];
  longint         cycle;
  int             sent;

  pipelined_multiplier #(.N(N), .M(M), .B(B)) dut (
    .clk, .rst_n, .valid_in, .a, .b, .valid_out, .product
  );

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    valid_in = 1'b0;
    a        = '0;
    b        = '0;
    sent     = 0;
    cycle    = 0;
    @(posedge rst_n);
    while (sent < int'(NUM_OPS)) begin
      @(negedge clk);
      valid_in = ($urandom_range(0, 7) != 0);
      a = N'({$urandom, $urandom});
      b = M'({$urandom, $urandom});
      case ($urandom_range(0, 9))
        0: begin a = '1; b = '1; end
        1: a = '0;
        2: b = '0;
        3: b = M'(1) << $urandom_range(0, M - 1);
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
      $display("N=%0d M=%0d: %0d products never came out", N, M, q.size());
    end
    done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycle <= cycle + 1;
      if (valid_in) begin
        exp_t e;
        e.p    = (N+M)'(a) * (N+M)'(b);
        e.t_in = cycle;
        q.push_back(e);
      end
      if (valid_out) begin
        checks++;
        if (q.size() == 0) begin
          failures++;
          $display("N=%0d M=%0d: unexpected product", N, M);
        end else begin
          exp_t e;
          e = q.pop_front();
          checks++;
          if (product !== e.p) begin
            failures++;
            $display("N=%0d M=%0d: product %h expected %h", N, M, product, e.p);
          end
          if (cycle - e.t_in != longint'(LAT)) begin
            failures++;
            $display("N=%0d M=%0d: latency %0d expected %0d", N, M,
                     cycle - e.t_in, LAT);
          end
        end
      end
    end
  end
endmodule
