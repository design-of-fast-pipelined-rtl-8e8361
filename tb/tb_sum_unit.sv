// tb_sum_unit: exhaustive check of the S unit for blocking factors 2 and 4.
// Reference: the B sum bits equal the low B bits of a + b + c.
module tb_sum_unit;
  int checks = 0, failures = 0;

  logic       c2, c4;
  logic [1:0] a2, b2, s2;
  logic [3:0] a4, b4, s4;

  sum_unit #(.B(2)) dut2 (.c_blk(c2), .a(a2), .b(b2), .s(s2));
  sum_unit #(.B(4)) dut4 (.c_blk(c4), .a(a4), .b(b4), .s(s4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {c2, a2, b2} = 5'(i);
      #1;
      checks++;
      if (s2 !== 2'(a2 + b2 + 2'(c2))) begin
        failures++;
        $display("B=2 %0d+%0d+%0d got %0d", a2, b2, c2, s2);
      end
    end
    for (int i = 0; i < 512; i++) begin
      {c4, a4, b4} = 9'(i);
      #1;
      checks++;
      if (s4 !== 4'(a4 + b4 + 4'(c4))) begin
        failures++;
        $display("B=4 %0d+%0d+%0d got %0d", a4, b4, c4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
