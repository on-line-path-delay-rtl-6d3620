// Self-checking test of omega_min: random switch settings, every source
// traced to its destination by walking the shuffle/exchange positions.
module omega_min_tb;
  localparam int unsigned N  = 8;
  localparam int unsigned M  = 8;
  localparam int unsigned ST = $clog2(N);
  logic [N-1:0][M-1:0]   src, dst;
  logic [ST-1:0][N/2-1:0] ctrl;
  int checks = 0, failures = 0;

  omega_min #(.N_PORTS(N), .M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      for (int s = 0; s < N; s++) src[s] = M'($urandom);
      for (int st = 0; st < ST; st++) ctrl[st] = (N/2)'($urandom);
      #1;
      for (int s = 0; s < N; s++) begin
        int p;
        p = s;
        for (int st = 0; st < ST; st++) begin
          p = ((p << 1) | (p >> (ST - 1))) & (N - 1);
          if (ctrl[st][p/2]) p = p ^ 1;
        end
        checks++;
        if (dst[p] !== src[s]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
