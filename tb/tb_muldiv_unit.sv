// tb_muldiv_unit: holds valid with random operations as the pipeline does,
// checks that stall stays high until ready, that ready comes 34 cycles
// after valid rises, the result of all eight M operations, and that a
// flush aborts an operation so the next one starts clean. Operands that
// change after the start cycle must not alter the result.
module tb_muldiv_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic valid = 0, flush = 0, stall, ready;
  logic [2:0] funct3;
  logic [31:0] rs1, rs2, result;
  int checks = 0, failures = 0;

  muldiv_unit dut (.*);

  function automatic logic [31:0] model(input logic [2:0] f, input logic [31:0] x, input logic [31:0] y);
    logic [63:0] ss, su, uu;
    ss = 64'($signed(x)) * 64'($signed(y));
    su = 64'($signed(x)) * {32'b0, y};
    uu = {32'b0, x} * {32'b0, y};
    case (f)
      0: return ss[31:0];
      1: return ss[63:32];
      2: return su[63:32];
      3: return uu[63:32];
      default: begin
        if (y == 0) return f[1] ? x : 32'hffffffff;
        if (x == 32'h80000000 && y == 32'hffffffff && !f[0]) return f[1] ? 0 : x;
        case (f)
          4: return 32'($signed(x) / $signed(y));
          5: return x / y;
          6: return 32'($signed(x) % $signed(y));
          default: return x % y;
        endcase
      end
    endcase
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input logic [2:0] f, input logic [31:0] x, input logic [31:0] y);
    int n = 1;
    @(negedge clk); valid = 1; funct3 = f; rs1 = x; rs2 = y;
    #1;
    while (!ready) begin
      if (!stall) begin failures++; checks++; $display("FAIL: no stall while busy"); end
      @(negedge clk); #1; n++;
    end
    checks += 3;
    if (stall) begin failures++; $display("FAIL: stall with ready"); end
    if (n != 34) begin failures++; $display("FAIL: cycles %0d", n); end
    if (result != model(f, x, y)) begin failures++; $display("FAIL: f%0d %h %h = %h", f, x, y, result); end
    @(negedge clk); valid = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 200; i++) op(3'($urandom), $urandom, (i % 10 == 0) ? 0 : $urandom);
    // flush in the middle of a divide
    @(negedge clk); valid = 1; funct3 = 4; rs1 = 1000; rs2 = 3;
    repeat (10) @(negedge clk);
    flush = 1; @(negedge clk); flush = 0; valid = 0;
    checks++;
    if (stall || ready) begin failures++; $display("FAIL: flush did not abort"); end
    op(3'd0, 32'd6, 32'd7);
    op(3'd4, 32'hfffffff9, 32'd2);
    // operands that change after the start cycle (a forwarded value going
    // away) must not affect the result
    for (int i = 0; i < 40; i++) begin
      logic [2:0] f;
      logic [31:0] x, y;
      f = (i % 2) ? 3'($urandom) : ((i % 4) ? 3'd4 : 3'd6); x = $urandom; y = (i % 5 == 0) ? 0 : $urandom;
      @(negedge clk); valid = 1; funct3 = f; rs1 = x; rs2 = y;
      @(negedge clk); rs1 = $urandom; rs2 = $urandom;
      #1;
      while (!ready) begin @(negedge clk); #1; end
      checks++;
      if (result != model(f, x, y)) begin failures++; $display("FAIL: held operands f%0d %h %h = %h", f, x, y, result); end
      @(negedge clk); valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
