// tb_restoring_div: random unsigned 33-bit dividends and divisors; checks
// quotient, remainder, 33-edge latency and cancel.
module tb_restoring_div;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, cancel = 0, busy, done;
  logic [32:0] dividend, divisor, quot, rem;
  int checks = 0, failures = 0;

  restoring_div dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [32:0] x, input logic [32:0] y);
    int n;
    @(negedge clk); dividend = x; divisor = y; start = 1;
    @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    checks += 2;
    if (y != 0 && (quot != x / y || rem != x % y)) begin
      failures++; $display("FAIL: %h/%h = %h r %h", x, y, quot, rem);
    end
    if (n != 33) begin failures++; $display("FAIL: latency %0d", n); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(33'h0ffffffff, 33'd1);
    run(33'h080000000, 33'h0ffffffff);
    run(33'd7, 33'd0);
    for (int i = 0; i < 300; i++) begin
      logic [32:0] x, y;
      x = {1'b0, 32'($urandom)};
      y = (i % 2) ? {1'b0, 32'($urandom)} : 33'($urandom_range(1, 1000));
      run(x, y);
    end
    @(negedge clk); dividend = 100; divisor = 7; start = 1;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL: cancel ignored"); end
    run(33'd100, 33'd7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
