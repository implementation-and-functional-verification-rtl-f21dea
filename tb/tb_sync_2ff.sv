// tb_sync_2ff: output equals the input delayed by two clocks; reset value.
module tb_sync_2ff;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] d = 0, q;
  int checks = 0, failures = 0;

  sync_2ff #(.W(4), .RST_VAL(4'b1010)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] hist [600];
    rst_n = 1; #1 rst_n = 0; #1;
    checks++;
    if (q != 4'b1010) begin failures++; $display("FAIL: reset value %b", q); end
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      hist[i] = 4'($urandom);
      d = hist[i];
      @(negedge clk);
      if (i >= 1) begin
        checks++;
        if (q != hist[i-1]) begin failures++; $display("FAIL: cycle %0d q=%h exp %h", i, q, hist[i-1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
