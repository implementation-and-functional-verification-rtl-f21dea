// tb_booth_mult: random signed 33-bit operand pairs (plus extremes); checks
// the 66-bit product, that done arrives exactly 33 clock edges after the
// start edge (34 cycles counting the start cycle), and that cancel returns
// the unit to idle.
module tb_booth_mult;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, cancel = 0, busy, done;
  logic [32:0] a, b;
  logic [65:0] p;
  int checks = 0, failures = 0;

  booth_mult dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [32:0] x, input logic [32:0] y);
    int n = 0;
    logic signed [65:0] exp;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    exp = 66'($signed(x)) * 66'($signed(y));
    checks += 2;
    if (p != exp) begin failures++; $display("FAIL: %h*%h=%h exp %h", x, y, p, exp); end
    if (n != 33) begin failures++; $display("FAIL: latency %0d", n); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(33'h100000000, 33'h100000000);
    run(33'h0ffffffff, 33'h0ffffffff);
    run(33'h1ffffffff, 33'h000000001);
    for (int i = 0; i < 300; i++) run({1'($urandom), 32'($urandom)}, {1'($urandom), 32'($urandom)});
    // cancel in the middle
    @(negedge clk); a = 5; b = 7; start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    cancel = 1; @(negedge clk); cancel = 0;
    checks++;
    if (busy || done) begin failures++; $display("FAIL: cancel ignored"); end
    repeat (40) @(negedge clk);
    checks++;
    if (done) begin failures++; $display("FAIL: done after cancel"); end
    run(33'd12345, 33'd678);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
