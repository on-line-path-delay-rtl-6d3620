// Buffered network ports of one processor.
//
// Output side: a transmit buffer the processor fills (tx_wr); each network
// transfer cycle with send high moves the head word into the output register
// tx_data, which drives the processor's MIN source and holds its value between
// transfers. Input side: with recv high the word on the processor's MIN
// destination (rx_in) is written into the receive buffer at the clock edge;
// the processor reads it with rx_rd (head word on rx_rdata). The transmit
// buffer has DEPTH words, the same for every processor; a communication
// session ends when all transmit buffers are empty. The receive buffer has
// DEPTH+1 words, because a destination stores the word its source held from
// before the session (seen through the new configuration, which the on-line
// test needs) ahead of the DEPTH words sent. A word put on tx_data at one edge is captured by the receiver at
// the next edge, one clock period later.
//
// Separate buffered input and output ports are the method's; the depths, the
// output register and the extra receive entry are this design's.
module node_port #(
  parameter int unsigned M     = 8,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned AW   = (DEPTH < 2) ? 1 : $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  // processor side
  input  logic         tx_wr,
  input  logic [M-1:0] tx_wdata,
  output logic         tx_full,
  input  logic         rx_rd,
  output logic [M-1:0] rx_rdata,
  output logic         rx_empty,
  output logic [AW:0]  rx_count,
  // network side
  input  logic         send,
  output logic [M-1:0] tx_data,
  output logic         tx_empty,
  input  logic         recv,
  input  logic [M-1:0] rx_in
);

  logic [M-1:0] tx_head;
  localparam int unsigned RAW = $clog2(DEPTH + 1);
  logic         rx_full_unused;
  logic [AW:0]  tx_count_unused;
  logic [RAW:0] rx_cnt;

  sync_fifo #(.W(M), .DEPTH(DEPTH)) u_txbuf (
    .clk, .rst_n,
    .push(tx_wr), .din(tx_wdata),
    .pop(send), .dout(tx_head),
    .empty(tx_empty), .full(tx_full), .count(tx_count_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 tx_data <= '0;
    else if (send && !tx_empty) tx_data <= tx_head;
  end

  sync_fifo #(.W(M), .DEPTH(DEPTH + 1)) u_rxbuf (
    .clk, .rst_n,
    .push(recv), .din(rx_in),
    .pop(rx_rd), .dout(rx_rdata),
    .empty(rx_empty), .full(rx_full_unused), .count(rx_cnt)
  );

  // DEPTH+1 always fits in AW+1 bits.
  assign rx_count = rx_cnt[AW:0];

endmodule
