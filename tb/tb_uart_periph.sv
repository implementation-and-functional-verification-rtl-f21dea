// tb_uart_periph: the serial output is looped back to the input. The test
// stores bytes to data-in (and once re-sends with the CSR Wr_UART bit),
// then polls the CSR Rx_Empty bit, reads data-out and pops it with the CSR
// Rd_UART bit, checking every byte comes back in order. The bus and UART
// clocks are unrelated; a small baud divisor keeps the run short.
module tb_uart_periph;
  logic clk = 0, uart_clk = 0, rst_n = 0, uart_rst_n = 0;
  always #5 clk = ~clk;
  always #6.5 uart_clk = ~uart_clk;
  logic sel = 0, re = 0;
  logic [1:0] addr = 0, we = 0;
  logic [31:0] wdata = 0, rdata;
  logic line;
  logic [7:0] exp [$];
  int checks = 0, failures = 0;

  uart_periph #(.DIV(2), .FIFO_AW(4)) dut (.clk, .rst_n, .uart_clk, .uart_rst_n, .sel, .addr, .we,
                                           .re, .wdata, .rdata, .rx(line), .tx(line));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic [1:0] a, input logic [7:0] d);
    @(negedge clk); sel = 1; addr = a; we = 2'b01; wdata = {24'h0, d};
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic load(input logic [1:0] a, output logic [7:0] d);
    @(negedge clk); sel = 1; addr = a; re = 1; #1 d = rdata[7:0];
    @(negedge clk); sel = 0; re = 0;
  endtask

  initial begin
    logic [7:0] v;
    repeat (3) @(negedge clk); rst_n = 1; uart_rst_n = 1;
    load(2, v);
    checks++;
    if (v != 8'h08) begin failures++; $display("FAIL: reset CSR %b", v); end
    for (int i = 0; i < 12; i++) begin
      v = 8'($urandom);
      exp.push_back(v);
      store(0, v);
    end
    store(2, 8'h01);                // send data-in again
    exp.push_back(exp[$]);
    load(0, v);
    checks++;
    if (v != exp[$]) begin failures++; $display("FAIL: data-in readback %h", v); end
    while (exp.size() != 0) begin
      int spin = 0;
      do begin load(2, v); spin++; end while (v[3] && spin < 20000);
      load(1, v);
      checks++;
      if (v != exp[0]) begin failures++; $display("FAIL: rx %h exp %h", v, exp[0]); end
      void'(exp.pop_front());
      store(2, 8'h02);              // pop the received byte
    end
    repeat (20) @(negedge clk);
    load(2, v);
    checks++;
    if (!v[3]) begin failures++; $display("FAIL: rx not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
