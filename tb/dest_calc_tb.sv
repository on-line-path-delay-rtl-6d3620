// Self-checking test of dest_calc: for every source and counter value the
// destination must equal src XOR (c_1..c_N read as bits N-1..0), and for each
// counter value the destinations must form a permutation.
module dest_calc_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned ST = $clog2(N);
  logic [ST-1:0] src, c, dest;
  int checks = 0, failures = 0;

  dest_calc #(.N_PORTS(N)) dut (.*);

  initial begin
    for (int g = 0; g < N; g++) begin
      logic [N-1:0] hit;
      int rev;
      hit = '0;
      rev = 0;
      for (int i = 0; i < ST; i++) if (g[i]) rev |= 1 << (ST - 1 - i);
      for (int s = 0; s < N; s++) begin
        src = ST'(s);
        c   = ST'(g);
        #1;
        checks++;
        if (int'(dest) != (s ^ rev)) failures++;
        hit[dest] = 1'b1;
      end
      checks++;
      if (hit != '1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
