// Up/down Gray code counter of W bits.
//
// Drives the stage control lines of the MIN: bit i-1 of the code is the
// common control value c_i of all switches of stage i, so c_1 is the least
// significant bit. Counting up from 0 visits all 2**W codes and changes one
// bit per step; counting down retraces them. A binary count is kept
// internally and the code is registered, so the outputs change only at a
// clock edge and never glitch.
//
// clr (synchronous) returns to code 0; en advances one step in the direction
// given by up. at_max / at_min report that the count is 2**W-1 / 0. The count
// wraps at both ends.
//
// The up/down Gray counter and the c_1-is-LSB order are the method's; keeping a
// binary count inside and registering the code is this design's choice.
module gray_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         up,
  output logic [W-1:0] gray,
  output logic         at_max,
  output logic         at_min
);

  logic [W-1:0] bin_q, bin_d;

  always_comb begin
    bin_d = bin_q;
    if (clr)     bin_d = '0;
    else if (en) bin_d = up ? bin_q + 1'b1 : bin_q - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_q <= '0;
      gray  <= '0;
    end else begin
      bin_q <= bin_d;
      gray  <= bin_d ^ (bin_d >> 1);
    end
  end

  assign at_max = &bin_q;
  assign at_min = ~|bin_q;

endmodule
