// tb_imm_gen: random instructions of every format; the expected immediate
// is rebuilt here from the RV32I field layout.
module tb_imm_gen;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] instr, imm, exp;
  int checks = 0, failures = 0;
  logic [6:0] ops [9] = '{7'b0110111, 7'b0010111, 7'b1101111, 7'b1100111, 7'b1100011,
                          7'b0000011, 7'b0100011, 7'b0010011, 7'b0110011};

  imm_gen dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      instr = {$urandom} & 32'hffffff80 | 32'(ops[$urandom_range(0, 8)]);
      #1;
      case (instr[6:0])
        7'b0110111, 7'b0010111: exp = instr & 32'hfffff000;
        7'b1101111: exp = 32'($signed({instr[31], instr[19:12], instr[20], instr[30:21], 1'b0}));
        7'b1100011: exp = 32'($signed({instr[31], instr[7], instr[30:25], instr[11:8], 1'b0}));
        7'b0100011: exp = 32'($signed({instr[31:25], instr[11:7]}));
        7'b0110011: exp = 0;
        default:    exp = 32'($signed(instr[31:20]));
      endcase
      checks++;
      if (imm != exp) begin failures++; $display("FAIL: %h -> %h exp %h", instr, imm, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
