// soc_top: IoT security SoC. A five-stage RV32IM core fetches from a 256 KB
// instruction memory and reaches, through the memory-mapped I/O wrapper, a
// 256 KB data memory (0x00000-0x3FFFF), a UART (0x40000) and an ACORN
// authenticated-encryption module (0x80000: PDI +0, SDI +4, DO +8, CSR +12).
// Three clock/reset domains (core, UART, security module) each get an
// asynchronous reset synchronised by reset_sync; data crosses between them
// only through async FIFOs inside the peripherals. The instruction memory is
// filled through load_we/load_addr/load_data while the core is in reset.
// pc_out/wb_valid show the instruction retiring in write-back; stall, flush,
// muldiv_enable and muldiv_ready expose the pipeline control for observation.
module soc_top #(
  parameter int MEM_AW   = 16,
  parameter int UART_DIV = 27
) (
  input  logic              clk,
  input  logic              arst_n,
  input  logic              uart_clk,
  input  logic              uart_arst_n,
  input  logic              sec_clk,
  input  logic              sec_arst_n,
  input  logic              rx,
  output logic              tx,
  output logic              addr_error,
  input  logic              load_we,
  input  logic [MEM_AW-1:0] load_addr,
  input  logic [31:0]       load_data,
  output logic [31:0]       pc_out,
  output logic              wb_valid,
  output logic              stall,
  output logic              flush,
  output logic              muldiv_enable,
  output logic              muldiv_ready
);
  logic        rst_n, uart_rst_n, sec_rst_n;
  logic [31:0] imem_addr, imem_data, d_addr, d_wdata, d_rdata;
  logic [1:0]  d_we, d_whb;
  logic        d_re;

  reset_sync u_rs_core (.clk,               .arst_n,               .rst_n);
  reset_sync u_rs_uart (.clk(uart_clk),     .arst_n(uart_arst_n),  .rst_n(uart_rst_n));
  reset_sync u_rs_sec  (.clk(sec_clk),      .arst_n(sec_arst_n),   .rst_n(sec_rst_n));

  imem #(.AW(MEM_AW)) u_imem (.clk, .pc(imem_addr), .instr(imem_data),
                              .load_we, .load_addr, .load_data);

  riscv_core u_core (
    .clk, .rst_n,
    .imem_addr, .imem_data,
    .dbus_addr(d_addr), .dbus_wdata(d_wdata), .dbus_we(d_we), .dbus_re(d_re),
    .dbus_whb(d_whb), .dbus_rdata(d_rdata),
    .pc_out, .wb_valid, .stall, .flush, .muldiv_enable, .muldiv_ready);

  mmio_wrapper #(.ADDR_LEN(20), .MEM_AW(MEM_AW), .UART_DIV(UART_DIV)) u_mmio (
    .clk, .rst_n, .uart_clk, .uart_rst_n, .sec_clk, .sec_rst_n,
    .addr(d_addr), .wdata(d_wdata), .mem_write(d_we), .re(d_re), .whb(d_whb),
    .rdata(d_rdata), .addr_error, .rx, .tx);
endmodule
