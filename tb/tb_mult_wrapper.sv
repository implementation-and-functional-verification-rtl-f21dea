// tb_mult_wrapper: the wrapper is closed around an ideal 33x33 signed
// multiplier so its operand extension and result selection can be checked
// for MUL, MULH, MULHSU and MULHU against 64-bit reference arithmetic.
module tb_mult_wrapper;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [2:0] funct3;
  logic [31:0] rs1, rs2, result, exp;
  logic [32:0] a_ext, b_ext;
  logic [65:0] prod;
  int checks = 0, failures = 0;

  assign prod = 66'($signed(a_ext)) * 66'($signed(b_ext));
  mult_wrapper dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] ss, su, uu;
      rs1 = (i % 9 == 0) ? 32'h80000000 : $urandom;
      rs2 = (i % 7 == 0) ? 32'hffffffff : $urandom;
      funct3 = 3'($urandom_range(0, 3));
      #1;
      ss = 64'($signed(rs1)) * 64'($signed(rs2));
      su = 64'($signed(rs1)) * {32'b0, rs2};
      uu = {32'b0, rs1} * {32'b0, rs2};
      case (funct3)
        0: exp = ss[31:0];
        1: exp = ss[63:32];
        2: exp = su[63:32];
        default: exp = uu[63:32];
      endcase
      checks++;
      if (result != exp) begin failures++; $display("FAIL: f3=%0d %h %h -> %h", funct3, rs1, rs2, result); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
