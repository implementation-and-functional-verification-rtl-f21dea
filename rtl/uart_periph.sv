// uart_periph: memory-mapped UART of the SoC. The bus side runs on the core
// clock; the baud generator, transmitter and receiver run on the UART clock.
// Two 8-bit async FIFOs cross the domains: TX (core writes, UART reads) and
// RX (UART writes, core reads). Registers, one byte each, at byte offsets:
//   0  data-in : a store writes it and pushes its byte into the TX FIFO
//   1  data-out: the byte at the head of the RX FIFO (read only)
//   2  CSR     : {4'b0, Rx_Empty, Tx_full, Rd_UART, Wr_UART}; writing 1 to
//                Wr_UART pushes data-in again, writing 1 to Rd_UART pops RX;
//                the two write bits read as 0
// A read returns the bytes starting at the addressed offset in rdata[7:0]
// upwards. The transmitter starts whenever the TX FIFO holds a byte and it
// is idle; each received byte is pushed into the RX FIFO (dropped if full).
// Register set and CSR bits follow the document; offsets and the push on
// data-in store are this design's reading of it.
module uart_periph #(
  parameter int DIV     = 27,
  parameter int FIFO_AW = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_clk,
  input  logic        uart_rst_n,
  input  logic        sel,
  input  logic [1:0]  addr,
  input  logic [1:0]  we,
  input  logic        re,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  input  logic        rx,
  output logic        tx
);
  logic [7:0] din_q, tx_head, rx_head, rx_byte, csr;
  logic       tx_wr, tx_full, tx_empty, tx_pop, tx_busy, tx_done;
  logic       rx_rd, rx_full, rx_empty, rx_done;
  logic       tick;
  logic       wr_data, wr_csr;

  assign wr_data = sel && (we != 2'b00) && (addr == 2'd0);
  assign wr_csr  = sel && (we != 2'b00) && (addr == 2'd2);
  assign tx_wr   = wr_data || (wr_csr && wdata[0]);
  assign rx_rd   = wr_csr && wdata[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       din_q <= '0;
    else if (wr_data) din_q <= wdata[7:0];
  end

  async_fifo #(.W(8), .AW(FIFO_AW)) u_txf (
    .wclk(clk), .wrst_n(rst_n), .wr(tx_wr), .wdata(wr_data ? wdata[7:0] : din_q), .full(tx_full),
    .rclk(uart_clk), .rrst_n(uart_rst_n), .rd(tx_pop), .rdata(tx_head), .empty(tx_empty));
  async_fifo #(.W(8), .AW(FIFO_AW)) u_rxf (
    .wclk(uart_clk), .wrst_n(uart_rst_n), .wr(rx_done), .wdata(rx_byte), .full(rx_full),
    .rclk(clk), .rrst_n(rst_n), .rd(rx_rd), .rdata(rx_head), .empty(rx_empty));

  baud_gen #(.DIV(DIV)) u_baud (.clk(uart_clk), .rst_n(uart_rst_n), .tick);
  assign tx_pop = !tx_empty && !tx_busy;
  uart_tx u_tx (.clk(uart_clk), .rst_n(uart_rst_n), .tx_start(tx_pop), .s_tick(tick),
                .din(tx_head), .tx_done_tick(tx_done), .tx, .busy(tx_busy));
  uart_rx u_rx (.clk(uart_clk), .rst_n(uart_rst_n), .rx, .s_tick(tick),
                .rx_done_tick(rx_done), .dout(rx_byte));

  assign csr   = {4'b0000, rx_empty, tx_full, 2'b00};
  assign rdata = 32'({8'h00, csr, rx_head, din_q} >> (8 * addr));

  // re has no side effect here: reading data-out does not pop
  logic unused;
  assign unused = re ^ tx_done ^ rx_full;
endmodule
