// tb_uart_rx: drives serial frames at 16 ticks per bit and checks the
// received bytes, with back-to-back frames.
module tb_uart_rx;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx = 1, s_tick, rx_done_tick;
  logic [7:0] dout;
  logic [7:0] sent [$];
  int checks = 0, failures = 0;

  baud_gen #(.DIV(4)) u_bg (.clk, .rst_n, .tick(s_tick));
  uart_rx dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk)
    if (rst_n && rx_done_tick) begin
      checks++;
      if (sent.size() == 0 || dout != sent[0]) begin failures++; $display("FAIL: got %h", dout); end
      if (sent.size() != 0) void'(sent.pop_front());
    end

  localparam int BIT = 16 * 4;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    for (int n = 0; n < 40; n++) begin
      logic [9:0] frame;
      frame = {1'b1, 8'($urandom), 1'b0};
      sent.push_back(frame[8:1]);
      for (int i = 0; i < 10; i++) begin
        rx = frame[i];
        repeat (BIT) @(negedge clk);
      end
    end
    repeat (200) @(negedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL: %0d bytes lost", sent.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
