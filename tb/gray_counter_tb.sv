// Self-checking test of gray_counter: random up/down/clear steps against a
// binary reference; each step must change exactly one code bit.
module gray_counter_tb;
  localparam int unsigned W = 3;
  logic clk = 0, rst_n = 0, clr = 0, en = 0, up = 1;
  logic [W-1:0] gray;
  logic at_max, at_min;
  int ref_cnt = 0;
  int checks = 0, failures = 0;
  logic [W-1:0] prev;

  gray_counter #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      prev = gray;
      clr = ($urandom_range(0, 19) == 0);
      en  = ($urandom_range(0, 3) != 0);
      up  = (i < 100) ? 1'b1 : 1'($urandom);
      @(posedge clk);
      if (clr) ref_cnt = 0;
      else if (en) ref_cnt = up ? (ref_cnt + 1) % (1 << W) : (ref_cnt + (1 << W) - 1) % (1 << W);
      #1;
      checks++;
      if (gray != W'(ref_cnt ^ (ref_cnt >> 1))) failures++;
      checks++;
      if (at_max != (ref_cnt == (1 << W) - 1) || at_min != (ref_cnt == 0)) failures++;
      if (en && !clr) begin
        checks++;
        if ($countones(gray ^ prev) != 1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
