// Self-checking test of two_rail_checker: all-valid inputs give a
// complementary output, any non-complementary pair gives z0 == z1. Run with
// a power-of-two and an odd number of pairs.
module two_rail_checker_tb;
  localparam int unsigned P1 = 64;
  localparam int unsigned P2 = 5;
  logic [P1-1:0] a0, a1;
  logic [P2-1:0] b0, b1;
  logic za0, za1, zb0, zb1;
  int checks = 0, failures = 0;

  two_rail_checker #(.PAIRS(P1)) dut1 (.r0(a0), .r1(a1), .z0(za0), .z1(za1));
  two_rail_checker #(.PAIRS(P2)) dut2 (.r0(b0), .r1(b1), .z0(zb0), .z1(zb1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      int nbad;
      a0 = {$urandom, $urandom};
      a1 = ~a0;
      b0 = P2'($urandom);
      b1 = ~b0;
      nbad = $urandom_range(0, 2);
      for (int k = 0; k < nbad; k++) begin
        int j;
        j = $urandom_range(0, P1 - 1);
        a1[j] = a0[j];
        j = $urandom_range(0, P2 - 1);
        b1[j] = b0[j];
      end
      #1;
      checks++;
      if ((za0 != za1) != (a0 == ~a1)) failures++;
      checks++;
      if ((zb0 != zb1) != (b0 == ~b1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
