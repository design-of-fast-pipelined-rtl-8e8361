// pipe_delay: a chain of DEPTH latches (edge-triggered registers) of WIDTH
// bits, the "carried through the pipe" wiring of the adder and the skew
// buffers (D, 2D, ...) of the multiplier.
//
// d appears at q DEPTH clocks later; DEPTH = 0 is a plain wire.  With
// RESET = 1 every stage clears to zero on the asynchronous active-low rst_n
// (used for the valid flags); with RESET = 0 the registers have no reset, as
// the data latches of the design need none.  rst_n is unused when RESET = 0,
// and clk too when DEPTH = 0; the ports stay so that every instance looks the
// same.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1,
  parameter bit          RESET = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] stage_q [DEPTH];

    if (RESET) begin : g_rst
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < int'(DEPTH); i++) stage_q[i] <= '0;
        end else begin
          stage_q[0] <= d;
          for (int i = 1; i < int'(DEPTH); i++) stage_q[i] <= stage_q[i-1];
        end
      end
    end else begin : g_nrst
      always_ff @(posedge clk) begin
        stage_q[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) stage_q[i] <= stage_q[i-1];
      end
    end

    assign q = stage_q[DEPTH-1];
  end
endmodule
