// tb_alu: random and corner operands for all eight ALU operations; result
// and the zero, carry, sign and overflow flags are compared with values
// computed here on 33/64-bit integers.
module tb_alu;
  import riscv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] a, b, y, ey;
  alu_sel_e sel;
  logic zero, carry, sign, overflow, ec;
  int checks = 0, failures = 0;

  alu dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000, 32'hffffffff, 32'h20};
    for (int n = 0; n < 4000; n++) begin
      a = (n % 5 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = (n % 3 == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      sel = alu_sel_e'(3'($urandom));
      #1;
      ec = 0;
      case (sel)
        ALU_ADD: {ec, ey} = {1'b0, a} + {1'b0, b};
        ALU_SUB: begin ey = a - b; ec = (a < b); end
        ALU_SLL: ey = a << b[4:0];
        ALU_XOR: ey = a ^ b;
        ALU_SRL: ey = a >> b[4:0];
        ALU_SRA: ey = 32'($signed(a) >>> b[4:0]);
        ALU_OR:  ey = a | b;
        default: ey = a & b;
      endcase
      checks++;
      if (y != ey || zero != (ey == 0) || sign != ey[31] || carry != ec) begin
        failures++; $display("FAIL: %h op%0d %h = %h c%0d", a, sel, b, y, carry);
      end
      if (sel == ALU_SUB) begin
        checks++;
        if (overflow != (($signed(a) < $signed(b)) != ey[31])) begin
          failures++; $display("FAIL: overflow %h - %h", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
