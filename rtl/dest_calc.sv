// Destination address of a source for one simulated Gray counter value.
//
// When every source requests the destination computed here, the requests
// set all switches of stage i to the same state c_i and never conflict. The
// procedure follows the path a word takes through a network whose stage i
// switches all sit in state c_i: start from dest = src; for i = 1 .. N,
// perfect-shuffle dest (rotate left) and, when c_i = 1, flip its least
// significant bit (dest+1 if it is even, dest-1 if odd). c[i-1] is c_i.
// Combinational. The procedure is the method's, step for step.
module dest_calc #(
  parameter int unsigned N_PORTS = 8,
  localparam int unsigned STAGES = $clog2(N_PORTS)
) (
  input  logic [STAGES-1:0] src,
  input  logic [STAGES-1:0] c,
  output logic [STAGES-1:0] dest
);

  always_comb begin
    dest = src;
    for (int i = 0; i < STAGES; i++) begin
      dest = (dest << 1) | (dest >> (STAGES - 1));
      if (c[i]) dest[0] = ~dest[0];
    end
  end

endmodule
