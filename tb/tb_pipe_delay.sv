// tb_pipe_delay: checks delay lines of depth 0, 1 and 6, with and without
// reset.  Every output is compared with the value driven DEPTH clocks
// earlier (kept in a history array), and the resettable line must read zero
// during and right after reset.
module tb_pipe_delay;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [7:0] d;
  logic [7:0] q0, q1, q6, q6r;
  logic [7:0] hist [64];
  int         n = 0;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  pipe_delay #(.WIDTH(8), .DEPTH(0))              u0  (.clk, .rst_n, .d, .q(q0));
  pipe_delay #(.WIDTH(8), .DEPTH(1))              u1  (.clk, .rst_n, .d, .q(q1));
  pipe_delay #(.WIDTH(8), .DEPTH(6))              u6  (.clk, .rst_n, .d, .q(q6));
  pipe_delay #(.WIDTH(8), .DEPTH(6), .RESET(1'b1)) u6r (.clk, .rst_n, .d, .q(q6r));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h (step %0d)", what, got, exp, n);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 8'h00;
    repeat (2) @(posedge clk);
    #1;
    check(q6r, 8'h00, "reset");
    rst_n = 1'b1;
    for (n = 0; n < 64; n++) begin
      @(negedge clk);
      d = 8'($urandom);
      hist[n] = d;
      #1;
      check(q0, d, "depth 0");
      if (n >= 1) check(q1, hist[n-1], "depth 1");
      if (n >= 6) begin
        check(q6, hist[n-6], "depth 6");
        check(q6r, hist[n-6], "depth 6 reset");
      end else begin
        check(q6r, 8'h00, "depth 6 after reset");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
