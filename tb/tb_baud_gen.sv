// tb_baud_gen: the tick must be a single-cycle pulse every DIV clocks.
module tb_baud_gen;
  logic clk = 0, rst_n = 0, tick;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  baud_gen #(.DIV(27)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last = -1, n = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != 27) begin failures++; $display("FAIL: period %0d", c - last); end
        end
        last = c; n++;
      end
    end
    checks++;
    if (n < 70) begin failures++; $display("FAIL: only %0d ticks", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
