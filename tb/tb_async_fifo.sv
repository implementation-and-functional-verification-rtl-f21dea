// tb_async_fifo: writer and reader on unrelated clocks (10 ns and 7.3 ns)
// with random enables; every word must arrive once and in order, and the
// full flag must stop writes without data loss.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  always #5 wclk = ~wclk;
  always #3.65 rclk = ~rclk;
  logic wr = 0, rd = 0, full, empty;
  logic [31:0] wdata = 0, rdata;
  logic [31:0] q [$];
  int checks = 0, failures = 0, sent = 0, got = 0;

  async_fifo #(.W(32), .AW(4)) dut (.*);

  initial begin
    repeat (100000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge wclk); wrst_n = 1;
    while (sent < 2000) begin
      @(negedge wclk);
      wr = !full && ($urandom_range(0, 99) < ((sent / 300) % 2 ? 90 : 40));
      wdata = $urandom;
      if (wr) begin q.push_back(wdata); sent++; end
    end
    @(negedge wclk); wr = 0;
  end

  initial begin
    repeat (3) @(negedge rclk); rrst_n = 1;
    while (got < 2000) begin
      @(negedge rclk);
      rd = 0;
      if (!empty && $urandom_range(0, 99) < 60) begin
        checks++;
        if (q.size() == 0 || rdata != q[0]) begin failures++; $display("FAIL: got %h", rdata); end
        if (q.size() != 0) void'(q.pop_front());
        rd = 1; got++;
      end
    end
    @(negedge rclk); rd = 0;
    repeat (10) @(negedge rclk);
    checks++;
    if (!empty) begin failures++; $display("FAIL: not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
