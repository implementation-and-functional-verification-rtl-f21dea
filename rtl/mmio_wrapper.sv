// mmio_wrapper: memory-mapped I/O of the SoC. The core's load/store bus
// (address, data, control) reaches three targets chosen by a chip-select
// decoder on Address[19:18]: 0 data memory (Address[17:0]), 1 UART,
// 2 security module; 3 is invalid and sets the sticky addr_error flag. Only
// the selected target sees the store/load strobes, and the read data of the
// selected target is returned. Each target returns the bytes starting at the
// addressed byte. The memory runs on the core clock; the UART and security
// module bring their own clocks and resets. Decoding follows the document.
module mmio_wrapper #(
  parameter int ADDR_LEN = 20,
  parameter int MEM_AW   = 16,
  parameter int UART_DIV = 27
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        uart_clk,
  input  logic        uart_rst_n,
  input  logic        sec_clk,
  input  logic        sec_rst_n,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [1:0]  mem_write,
  input  logic        re,
  input  logic [1:0]  whb,
  output logic [31:0] rdata,
  output logic        addr_error,
  input  logic        rx,
  output logic        tx
);
  localparam logic [1:0] MEMORY_SEL = 2'd0, UART_SEL = 2'd1, SEC_MOD_SEL = 2'd2;

  logic [1:0]  chip_select;
  logic        cs_mem, cs_uart, cs_sec, access;
  logic [31:0] mem_rdata, uart_rdata, sec_rdata;

  assign chip_select = addr[ADDR_LEN-1:ADDR_LEN-2];
  assign cs_mem  = (chip_select == MEMORY_SEL);
  assign cs_uart = (chip_select == UART_SEL);
  assign cs_sec  = (chip_select == SEC_MOD_SEL);
  assign access  = re || (mem_write != 2'b00);

  dmem #(.AW(MEM_AW)) u_dmem (.clk, .addr(addr[MEM_AW+1:0]), .rdata(mem_rdata),
                              .mem_write(cs_mem ? mem_write : 2'b00), .wdata);

  uart_periph #(.DIV(UART_DIV)) u_uart (
    .clk, .rst_n, .uart_clk, .uart_rst_n, .sel(cs_uart), .addr(addr[1:0]),
    .we(mem_write), .re, .wdata, .rdata(uart_rdata), .rx, .tx);

  sec_module u_sec (
    .clk, .rst_n, .sec_clk, .sec_rst_n, .sel(cs_sec), .addr(addr[3:0]),
    .we(mem_write), .re, .whb, .wdata, .rdata(sec_rdata));

  always_comb begin
    unique case (chip_select)
      MEMORY_SEL:  rdata = mem_rdata;
      UART_SEL:    rdata = uart_rdata;
      SEC_MOD_SEL: rdata = sec_rdata;
      default:     rdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) addr_error <= 1'b0;
    else if (access && chip_select == 2'd3) addr_error <= 1'b1;
  end
endmodule
