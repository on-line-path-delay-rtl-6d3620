// Self-checking test of response_capture: q1 is the input one edge ago,
// q2 two edges ago; clear empties both ranks.
module response_capture_tb;
  localparam int unsigned L = 16;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [L-1:0] d, q1, q2, h1, h2;
  int checks = 0, failures = 0;

  response_capture #(.LINES(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; h1 = '0; h2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      clr = (i == 50);
      d = L'($urandom);
      @(posedge clk);
      if (clr) begin h2 = '0; h1 = '0; end
      else begin h2 = h1; h1 = d; end
      #1;
      checks++;
      if (q1 != h1 || q2 != h2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
