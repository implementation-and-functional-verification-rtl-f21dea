// tb_control_unit: decodes one instruction of each kind and compares the
// control bundle with the values of the control-signal table.
module tb_control_unit;
  import riscv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  // expected: {aluop, alusrc, pctoalu, regwrite, whb, memwrite, toreg, branch, uncond, jmp_i, ld_sxt, cx, muldiv}
  task automatic t(input string name, input logic [31:0] i, input logic [1:0] aluop, input logic alusrc,
                   input logic pctoalu, input logic regwrite, input logic [1:0] whb, input logic [1:0] memwrite,
                   input logic [1:0] toreg, input logic branch, input logic uncond, input logic jmp_i,
                   input logic ld_sxt, input logic cx, input logic muldiv);
    instr = i;
    #1;
    checks++;
    if (ctrl.regwrite != regwrite || ctrl.whb != whb || ctrl.memwrite != memwrite ||
        ctrl.branch != branch || ctrl.uncond != uncond || ctrl.jmp_i != jmp_i ||
        ctrl.cx != cx || ctrl.muldiv != muldiv ||
        (regwrite && ctrl.toreg != toreg) ||
        (!uncond && toreg != TOREG_IMM && (ctrl.aluop != aluop || ctrl.alusrc != alusrc || ctrl.pctoalu != pctoalu)) ||
        (whb != 0 && ctrl.ld_sxt != ld_sxt)) begin
      failures++; $display("FAIL: %s ctrl=%p", name, ctrl);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //      name     instr           aluop src pc rw whb  mw  toreg br un ji sx cx md
    t("add",   32'h003100b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("sub",   32'h403100b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("slt",   32'h003120b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 1, 0);
    t("sltu",  32'h003130b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 1, 0);
    t("lui",   32'h123450b7, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b11, 0, 0, 0, 0, 0, 0);
    t("auipc", 32'h12345097, 2'b01, 1, 1, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("jalr",  32'h000100e7, 2'b01, 1, 0, 1, 2'b00, 2'b00, 2'b00, 0, 0, 1, 0, 0, 0);
    t("lb",    32'h00010083, 2'b01, 1, 0, 1, 2'b01, 2'b00, 2'b01, 0, 0, 0, 1, 0, 0);
    t("lh",    32'h00011083, 2'b01, 1, 0, 1, 2'b10, 2'b00, 2'b01, 0, 0, 0, 1, 0, 0);
    t("lw",    32'h00012083, 2'b01, 1, 0, 1, 2'b11, 2'b00, 2'b01, 0, 0, 0, 1, 0, 0);
    t("lbu",   32'h00014083, 2'b01, 1, 0, 1, 2'b01, 2'b00, 2'b01, 0, 0, 0, 0, 0, 0);
    t("lhu",   32'h00015083, 2'b01, 1, 0, 1, 2'b10, 2'b00, 2'b01, 0, 0, 0, 0, 0, 0);
    t("addi",  32'h00510093, 2'b11, 1, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("sltiu", 32'h00513093, 2'b11, 1, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 1, 0);
    t("xori",  32'h00514093, 2'b11, 1, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("slli",  32'h00511093, 2'b00, 1, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("srai",  32'h40515093, 2'b00, 1, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 0);
    t("sb",    32'h00110023, 2'b01, 1, 0, 0, 2'b00, 2'b01, 2'b00, 0, 0, 0, 0, 0, 0);
    t("sh",    32'h00111023, 2'b01, 1, 0, 0, 2'b00, 2'b10, 2'b00, 0, 0, 0, 0, 0, 0);
    t("sw",    32'h00112023, 2'b01, 1, 0, 0, 2'b00, 2'b11, 2'b00, 0, 0, 0, 0, 0, 0);
    t("jal",   32'h008000ef, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b00, 0, 1, 0, 0, 0, 0);
    t("beq",   32'h00208463, 2'b10, 0, 0, 0, 2'b00, 2'b00, 2'b00, 1, 0, 0, 0, 0, 0);
    t("bgeu",  32'h0020f463, 2'b10, 0, 0, 0, 2'b00, 2'b00, 2'b00, 1, 0, 0, 0, 0, 0);
    t("mul",   32'h023100b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 1);
    t("remu",  32'h023170b3, 2'b00, 0, 0, 1, 2'b00, 2'b00, 2'b10, 0, 0, 0, 0, 0, 1);
    t("bad",   32'hffffffff, 2'b00, 0, 0, 0, 2'b00, 2'b00, 2'b00, 0, 0, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
