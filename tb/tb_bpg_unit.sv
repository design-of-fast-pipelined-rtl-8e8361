// tb_bpg_unit: exhaustive check of the BPG unit for blocking factors 2 and 3.
// Reference: G is 1 when some block i generates and every block above i
// propagates; P is 1 when all blocks propagate.
module tb_bpg_unit;
  int checks = 0, failures = 0;

  logic [1:0] p2, g2;
  logic       po2, go2;
  logic [2:0] p3, g3;
  logic       po3, go3;

  bpg_unit #(.B(2)) dut2 (.p_in(p2), .g_in(g2), .p_blk(po2), .g_blk(go2));
  bpg_unit #(.B(3)) dut3 (.p_in(p3), .g_in(g3), .p_blk(po3), .g_blk(go3));

  function automatic logic ref_g(input logic [7:0] p, input logic [7:0] g, input int b);
    logic r;
    r = 1'b0;
    for (int i = 0; i < b; i++) begin
      logic t;
      t = g[i];
      for (int j = i + 1; j < b; j++) t = t & p[j];
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
    for (int i = 0; i < 16; i++) begin
      {p2, g2} = 4'(i);
      #1;
      checks++;
      if (go2 !== ref_g(8'(p2), 8'(g2), 2) || po2 !== &p2) begin
        failures++;
        $display("B=2 p=%b g=%b -> %b %b", p2, g2, po2, go2);
      end
    end
    for (int i = 0; i < 64; i++) begin
      {p3, g3} = 6'(i);
      #1;
      checks++;
      if (go3 !== ref_g(8'(p3), 8'(g3), 3) || po3 !== &p3) begin
        failures++;
        $display("B=3 p=%b g=%b -> %b %b", p3, g3, po3, go3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
