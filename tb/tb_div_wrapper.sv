// tb_div_wrapper: the wrapper is closed around an ideal unsigned divider;
// DIV, DIVU, REM and REMU results, including division by zero and the
// most-negative / -1 overflow case, are compared with the RISC-V rules.
module tb_div_wrapper;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] funct3;
  logic [31:0] rs1, rs2, result, exp;
  logic [32:0] dividend, divisor, quot, rem;
  int checks = 0, failures = 0;

  assign quot = (divisor == 0) ? '1 : dividend / divisor;
  assign rem  = (divisor == 0) ? dividend : dividend % divisor;
  div_wrapper dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      rs1 = (i % 11 == 0) ? 32'h80000000 : $urandom;
      rs2 = (i % 13 == 0) ? 32'h0 : (i % 17 == 0) ? 32'hffffffff : (i % 2) ? $urandom : 32'($urandom_range(1, 300));
      funct3 = 3'($urandom_range(4, 7));
      #1;
      if (rs2 == 0) exp = funct3[1] ? rs1 : 32'hffffffff;
      else if (rs1 == 32'h80000000 && rs2 == 32'hffffffff && !funct3[0]) exp = funct3[1] ? 0 : rs1;
      else case (funct3)
        4: exp = 32'($signed(rs1) / $signed(rs2));
        5: exp = rs1 / rs2;
        6: exp = 32'($signed(rs1) % $signed(rs2));
        default: exp = rs1 % rs2;
      endcase
      checks++;
      if (result != exp) begin failures++; $display("FAIL: f3=%0d %h %h -> %h exp %h", funct3, rs1, rs2, result, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
