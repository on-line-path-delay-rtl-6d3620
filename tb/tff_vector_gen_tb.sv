// Self-checking test of tff_vector_gen: the preset must equal the vector
// built by the recursive doubling rule, and toggling must complement it.
module tff_vector_gen_tb;
  localparam int unsigned N = 8;
  localparam int unsigned M = 4;
  logic clk = 0, rst_n = 0, load = 0, t = 0;
  logic [N-1:0][M-1:0] q;
  logic [N-1:0] v;   // reference vector, bit i for source i
  int checks = 0, failures = 0;

  tff_vector_gen #(.N_PORTS(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [N-1:0] rule_vector();
    logic [N-1:0] u;
    int size;
    u = '0;
    u[1] = 1'b1; u[2] = 1'b1;          // 4x4: 0 1 1 0
    for (size = 8; size <= N; size *= 2)
      for (int i = 0; i < size / 2; i++) u[i + size/2] = ~u[i];
    return u;
  endfunction

  task automatic expect_vec(input logic inv);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (q[s] != {M{v[s] ^ inv}}) failures++;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = rule_vector();
    repeat (2) @(negedge clk);
    expect_vec(1'b0);                    // reset value
    rst_n = 1;
    @(negedge clk) t = 1;
    for (int i = 1; i <= 5; i++) begin
      @(negedge clk);
      expect_vec(1'(i));
    end
    t = 0;
    @(negedge clk) expect_vec(1'b1);     // holds
    load = 1;
    @(negedge clk) expect_vec(1'b0);
    load = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
