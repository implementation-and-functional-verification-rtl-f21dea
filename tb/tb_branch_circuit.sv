// tb_branch_circuit: drives the branch circuit from a real subtraction of
// random operands and compares each funct3 condition with the RISC-V
// comparison it implements (beq, bne, slt, sltu, blt, bge, bltu, bgeu),
// including operand pairs whose subtraction overflows.
module tb_branch_circuit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] funct3;
  logic zero, carry, sign, overflow, cond, exp;
  logic [31:0] a, b, d;
  int checks = 0, failures = 0;

  branch_circuit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = $urandom; b = (n % 4 == 0) ? a : $urandom;
      if (n % 7 == 0) begin a = 32'd1895109858; b = -32'sd2142972622; end
      d = a - b;
      zero = (d == 0); carry = (a < b); sign = d[31];
      overflow = (a[31] != b[31]) && (d[31] != a[31]);
      funct3 = 3'($urandom);
      #1;
      case (funct3)
        0: exp = (a == b);
        1: exp = (a != b);
        2, 4: exp = ($signed(a) < $signed(b));
        5: exp = ($signed(a) >= $signed(b));
        3, 6: exp = (a < b);
        default: exp = (a >= b);
      endcase
      checks++;
      if (cond != exp) begin failures++; $display("FAIL: f3=%0d a=%h b=%h", funct3, a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
