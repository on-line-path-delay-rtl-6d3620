// Two-rail checker cell: merges two 2-rail pairs into one.
//
// A pair is a valid code word when its two rails are complementary. The
// outputs z0 = a0 b0 + a1 b1 and z1 = a0 b1 + a1 b0 are complementary if and
// only if both input pairs are. Combinational.
module two_rail_cell (
  input  logic a0,
  input  logic a1,
  input  logic b0,
  input  logic b1,
  output logic z0,
  output logic z1
);
  assign z0 = (a0 & b0) | (a1 & b1);
  assign z1 = (a0 & b1) | (a1 & b0);
endmodule
