// Two-by-two switch of the Omega MIN.
//
// Two input buses X0, X1 and two output buses Y0, Y1, all M bits wide, and
// one control line c. With c = 0 the switch is in the direct state (X0->Y0,
// X1->Y1); with c = 1 it is in the cross state (X0->Y1, X1->Y0). As in the
// multiplexer-based switch the test method relies on, every output line is a
// 2:1 multiplexer, so the switch is 2M multiplexers sharing c; each pair of
// multiplexers takes line j of both inputs and drives line j of both outputs.
// Purely combinational.
module min_switch #(
  parameter int unsigned M = 8   // bus width of one slice
) (
  input  logic [M-1:0] x0,
  input  logic [M-1:0] x1,
  input  logic         c,
  output logic [M-1:0] y0,
  output logic [M-1:0] y1
);

  for (genvar j = 0; j < M; j++) begin : g_mux_pair
    assign y0[j] = c ? x1[j] : x0[j];
    assign y1[j] = c ? x0[j] : x1[j];
  end

endmodule
