// tb_pipelined_adder: random-stream check of the pipelined adder at its
// default size (32 bits, blocking factor 2, latency 8), and at 27 bits with
// blocking factor 3 and 16 bits with blocking factor 4 (the two-level case
// with no BPG or CP row).  Each stream mixes ADD, MIN, MAX and PASS with
// bubbles, and the checker also verifies the latency and that one result
// leaves per clock.
module tb_pipelined_adder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;
  int   checks, failures;

  always #5 clk = ~clk;

  adder_stream_check #(.N(32), .B(2), .NUM_OPS(3000)) chk0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  adder_stream_check #(.N(27), .B(3), .NUM_OPS(1500)) chk1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  adder_stream_check #(.N(16), .B(4), .NUM_OPS(1500)) chk2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    checks   = c0 + c1 + c2;
    failures = f0 + f1 + f2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
