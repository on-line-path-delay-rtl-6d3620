// Self-checking test of min_switch: random buses in both states.
module min_switch_tb;
  localparam int unsigned M = 8;
  logic [M-1:0] x0, x1, y0, y1;
  logic c;
  int checks = 0, failures = 0;

  min_switch #(.M(M)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      x0 = M'($urandom);
      x1 = M'($urandom);
      c  = 1'(i);
      #1;
      checks++;
      if (c == 1'b0 && !(y0 == x0 && y1 == x1)) failures++;
      if (c == 1'b1 && !(y0 == x1 && y1 == x0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
