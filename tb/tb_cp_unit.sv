// tb_cp_unit: exhaustive check of the CP unit for blocking factors 2 and 3.
// Reference: the carry into block j is 1 when some block i < j generates and
// all blocks between propagate, or when the incoming carry propagates through
// all blocks below j.
module tb_cp_unit;
  int checks = 0, failures = 0;

  logic       c2, c3;
  logic [1:0] p2, g2, co_v2;
  logic [2:0] p3, g3, co_v3;


  cp_unit #(.B(2)) dut2 (.c_blk(c2), .p_in(p2), .g_in(g2), .c_out(co_v2));
  cp_unit #(.B(3)) dut3 (.c_blk(c3), .p_in(p3), .g_in(g3), .c_out(co_v3));

  // Carry into position j (j == b gives the carry out).
  function automatic logic ref_c(input logic c, input logic [7:0] p, input logic [7:0] g, input int j);
    logic r, t;
    r = c;
    for (int k = 0; k < j; k++) r = r & p[k];
    for (int i = 0; i < j; i++) begin
      t = g[i];
      for (int k = i + 1; k < j; k++) t = t & p[k];
      r = r | t;
    end
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {c2, p2, g2} = 5'(i);
      #1;
      for (int j = 0; j < 2; j++) begin
        checks++;
        if (co_v2[j] !== ref_c(c2, 8'(p2), 8'(g2), j)) begin
          failures++;
          $display("B=2 c=%b p=%b g=%b j=%0d got %b", c2, p2, g2, j, co_v2[j]);
        end
      end

    end
    for (int i = 0; i < 128; i++) begin
      {c3, p3, g3} = 7'(i);
      #1;
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (co_v3[j] !== ref_c(c3, 8'(p3), 8'(g3), j)) begin
          failures++;
          $display("B=3 c=%b p=%b g=%b j=%0d got %b", c3, p3, g3, j, co_v3[j]);
        end
      end

    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
