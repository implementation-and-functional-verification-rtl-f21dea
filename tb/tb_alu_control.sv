// tb_alu_control: every ALUOP / {bit30, funct3} combination against the
// expected ALU operation table.
module tb_alu_control;
  import riscv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [1:0] aluop;
  logic [3:0] ctrl_in;
  alu_sel_e sel, exp;
  int checks = 0, failures = 0;

  alu_control dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int c = 0; c < 16; c++) begin
        aluop = 2'(op); ctrl_in = 4'(c);
        #1;
        if (op == 1) exp = ALU_ADD;
        else if (op == 2) exp = ALU_SUB;
        else case (c[2:0])
          0: exp = (op == 0 && c[3]) ? ALU_SUB : ALU_ADD;
          1: exp = ALU_SLL;
          2, 3: exp = ALU_SUB;
          4: exp = ALU_XOR;
          5: exp = c[3] ? ALU_SRA : ALU_SRL;
          6: exp = ALU_OR;
          default: exp = ALU_AND;
        endcase
        checks++;
        if (sel != exp) begin failures++; $display("FAIL: aluop=%0d in=%b -> %0d", op, ctrl_in, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
