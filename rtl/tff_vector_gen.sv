// Source test vector generator: n*M T flip-flops, one per MIN source line.
//
// The flip-flops of source s are preset (load) to bit s of the test vector
// given by the recursive rule (0110 for n = 4, then v[i] = u[i] and
// v[i+n/2] = ~u[i]), the same value on all M lines of the source bus. While
// t is high every flip-flop toggles at each clock edge, so the sources
// alternate between the vector and its complement; with t low they hold.
// These two complementary vectors are the only source patterns the tester
// ever applies. Reset also presets the vector.
//
// The T flip-flops and the vector rule are the method's; the synchronous load
// and the reset value are this design's.
module tff_vector_gen #(
  parameter int unsigned N_PORTS = 8,
  parameter int unsigned M       = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,   // preset to the test vector
  input  logic                      t,      // common T input
  output logic [N_PORTS-1:0][M-1:0] q
);
  import omega_pkg::*;

  logic [N_PORTS-1:0][M-1:0] preset;
  for (genvar s = 0; s < N_PORTS; s++) begin : g_preset
    assign preset[s] = {M{test_vector_bit(s)}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= preset;
    else if (load) q <= preset;
    else if (t)    q <= ~q;
  end

endmodule
