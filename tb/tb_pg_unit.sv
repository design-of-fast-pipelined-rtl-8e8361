// tb_pg_unit: exhaustive check of the PG unit for blocking factors 2 and 4.
// Reference: the group generate is the carry out of a + b (carry-in 0) over
// the B bits, the group propagate is 1 when every bit has a | b set.
module tb_pg_unit;
  int checks = 0, failures = 0;

  logic [1:0] a2, b2;
  logic       p2, g2;
  logic [3:0] a4, b4;
  logic       p4, g4;

  pg_unit #(.B(2)) dut2 (.a(a2), .b(b2), .p_blk(p2), .g_blk(g2));
  pg_unit #(.B(4)) dut4 (.a(a4), .b(b4), .p_blk(p4), .g_blk(g4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      checks++;
      if (g2 !== 1'(({1'b0, a2} + {1'b0, b2}) >> 2) || p2 !== &(a2 | b2)) begin
        failures++;
        $display("B=2 a=%b b=%b p=%b g=%b", a2, b2, p2, g2);
      end
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (g4 !== 1'(({1'b0, a4} + {1'b0, b4}) >> 4) || p4 !== &(a4 | b4)) begin
        failures++;
        $display("B=4 a=%b b=%b p=%b g=%b", a4, b4, p4, g4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
