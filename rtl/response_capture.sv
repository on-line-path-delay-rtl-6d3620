// Response capture flip-flops: two D flip-flops per MIN output line.
//
// At every clock edge the first flip-flop of line k takes the MIN output and
// the second takes the first one's old value, so q1 holds the response of the
// last clock period and q2 the response of the period before. When a test
// transition reached the output within one period, q1[k] and q2[k] are
// complementary; the pair (q1[k], q2[k]) is one input pair of the 2-rail
// checker. clr (synchronous) and reset set both ranks to 0.
//
// Two flip-flops per output are the method's; connecting them in series is
// this design's reading of how the checker compares two consecutive periods.
module response_capture #(
  parameter int unsigned LINES = 64   // n*M
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [LINES-1:0] d,
  output logic [LINES-1:0] q1,
  output logic [LINES-1:0] q2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q1 <= '0;
      q2 <= '0;
    end else if (clr) begin
      q1 <= '0;
      q2 <= '0;
    end else begin
      q1 <= d;
      q2 <= q1;
    end
  end

endmodule
