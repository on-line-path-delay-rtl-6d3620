// Tree of 2-rail checker cells over PAIRS input pairs (2*PAIRS inputs).
//
// Pair k is (r0[k], r1[k]). The tree is a balanced binary tree of
// two_rail_cell instances; unused leaves up to the next power of two are
// tied to the valid code (0,1). The output pair (z0, z1) is complementary
// exactly when every input pair is complementary, so z0 == z1 flags an error.
// Combinational, ceil(log2(PAIRS)) cell levels deep.
//
// A 2-rail checker tree is the method's; the cell equations are the standard
// ones and the balanced shape and leaf padding are this design's.
module two_rail_checker #(
  parameter int unsigned PAIRS = 64
) (
  input  logic [PAIRS-1:0] r0,
  input  logic [PAIRS-1:0] r1,
  output logic             z0,
  output logic             z1
);
  localparam int unsigned LEAVES = (PAIRS < 2) ? 2 : (1 << $clog2(PAIRS));

  // Heap numbering: node 1 is the root, leaves are LEAVES..2*LEAVES-1.
  logic [2*LEAVES-1:1] n0, n1;

  for (genvar k = 0; k < LEAVES; k++) begin : g_leaf
    if (k < PAIRS) begin : g_used
      assign n0[LEAVES+k] = r0[k];
      assign n1[LEAVES+k] = r1[k];
    end else begin : g_pad
      assign n0[LEAVES+k] = 1'b0;
      assign n1[LEAVES+k] = 1'b1;
    end
  end

  for (genvar k = 1; k < LEAVES; k++) begin : g_node
    two_rail_cell u_cell (
      .a0(n0[2*k]), .a1(n1[2*k]),
      .b0(n0[2*k+1]), .b1(n1[2*k+1]),
      .z0(n0[k]), .z1(n1[k])
    );
  end

  assign z0 = n0[1];
  assign z1 = n1[1];

endmodule
