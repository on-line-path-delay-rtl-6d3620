// Self-checking test of node_port: transmit buffer order, full flag, the
// output register holding its word between transfers, and the receive
// buffer storing MIN words in order.
module node_port_tb;
  localparam int unsigned M = 8;
  localparam int unsigned D = 4;
  logic clk = 0, rst_n = 0;
  logic tx_wr = 0, rx_rd = 0, send = 0, recv = 0;
  logic [M-1:0] tx_wdata = '0, rx_in = '0, rx_rdata, tx_data;
  logic tx_full, rx_empty, tx_empty;
  logic [2:0] rx_count;
  logic [M-1:0] words [D];
  int checks = 0, failures = 0;

  node_port #(.M(M), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic ok);
    checks++;
    if (!ok) failures++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      // fill the transmit buffer
      chk(tx_empty && !tx_full);
      for (int i = 0; i < D; i++) begin
        words[i] = M'($urandom);
        tx_wr = 1; tx_wdata = words[i];
        @(negedge clk);
      end
      tx_wr = 0;
      chk(tx_full && !tx_empty);
      // send them, with idle cycles in between
      for (int i = 0; i < D; i++) begin
        send = 1;
        @(negedge clk);
        send = 0;
        chk(tx_data == words[i]);
        @(negedge clk);
        chk(tx_data == words[i]);
      end
      chk(tx_empty);
      // receive words
      for (int i = 0; i < D; i++) begin
        words[i] = M'($urandom);
        recv = 1; rx_in = words[i];
        @(negedge clk);
      end
      recv = 0;
      chk(rx_count == 3'(D) && !rx_empty);
      for (int i = 0; i < D; i++) begin
        chk(rx_rdata == words[i]);
        rx_rd = 1;
        @(negedge clk);
        rx_rd = 0;
      end
      chk(rx_empty);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
