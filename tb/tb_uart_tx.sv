// tb_uart_tx: sends random bytes and samples the line in the middle of
// each 16-tick bit: start bit 0, eight data bits LSB first, stop bit 1.
module tb_uart_tx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tx_start = 0, s_tick, tx_done_tick, tx, busy;
  logic [7:0] din;
  int checks = 0, failures = 0;

  baud_gen #(.DIV(4)) u_bg (.clk, .rst_n, .tick(s_tick));
  uart_tx dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int BIT = 16 * 4;
  initial begin
    logic [9:0] frame;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      din = 8'($urandom);
      @(negedge clk); tx_start = 1;
      @(negedge clk); tx_start = 0;
      wait (tx == 0);
      repeat (BIT / 2) @(negedge clk);
      for (int i = 0; i < 10; i++) begin
        frame[i] = tx;
        repeat (BIT) @(negedge clk);
      end
      checks++;
      if (frame != {1'b1, din, 1'b0}) begin failures++; $display("FAIL: sent %h frame %b", din, frame); end
      wait (!busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
