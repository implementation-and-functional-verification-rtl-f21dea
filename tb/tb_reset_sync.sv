// tb_reset_sync: the output drops immediately with the asynchronous reset
// and rises only on the second clock edge after release.
module tb_reset_sync;
  logic clk = 0, arst_n = 1, rst_n;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  reset_sync dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      #($urandom_range(1, 9));
      arst_n = 0; #1;
      checks++;
      if (rst_n) begin failures++; $display("FAIL: not asserted"); end
      repeat (3) @(posedge clk);
      #2 arst_n = 1;
      @(posedge clk); #1;
      checks++;
      if (rst_n) begin failures++; $display("FAIL: released after one edge"); end
      @(posedge clk); #1;
      checks++;
      if (!rst_n) begin failures++; $display("FAIL: not released after two edges"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
