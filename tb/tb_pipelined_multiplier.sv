// tb_pipelined_multiplier: random-stream check of the pipelined multiplier
// at its default 32 x 32 size (latency 289 clocks) and at 8 x 5 bits
// (latency 26) and 9 x 4 bits with blocking factor 3 (latency 13), all with
// bubbles, checking each product and its latency.
module tb_pipelined_multiplier;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   c0, f0, c1, f1, c2, f2;
  logic d0, d1, d2;

  always #5 clk = ~clk;

  mult_stream_check #(.N(32), .M(32), .B(2), .NUM_OPS(1500)) chk0 (.clk, .rst_n, .checks(c0), .failures(f0), .done(d0));
  mult_stream_check #(.N(8),  .M(5),  .B(2), .NUM_OPS(1500)) chk1 (.clk, .rst_n, .checks(c1), .failures(f1), .done(d1));
  mult_stream_check #(.N(9),  .M(4),  .B(3), .NUM_OPS(1500)) chk2 (.clk, .rst_n, .checks(c2), .failures(f2), .done(d2));

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
