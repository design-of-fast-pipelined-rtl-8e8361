// tb_adder_workloads: runs the pipelined adder at the other sizes discussed
// for it: a 64-bit word with blocking factor 2 (latency 10 clocks) and a
// blocking factor of 3 on an 81-bit word (four levels, latency 6 clocks).
// Each gets a random stream of ADD, MIN, MAX and PASS with bubbles; results
// and latency are checked against N+1 bit arithmetic.
module tb_adder_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c0, f0, c1, f1;
  logic d0, d1;

  always #5 clk = ~clk;

  adder_stream_check #(.N(64), .B(2), .NUM_OPS(3000)) chk64 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  adder_stream_check #(.N(81), .B(3), .NUM_OPS(3000)) chk81 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
