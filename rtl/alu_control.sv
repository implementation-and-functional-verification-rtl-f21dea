// alu_control: turns ALUOP and ctrl_in = {instr[30], instr[14:12]} into the
// ALU operation. ALUOP 01 forces add (addresses, AUIPC, JALR), 10 forces
// subtract (branch compare), 00 decodes funct3 with bit 30 selecting SUB/SRA,
// 11 decodes funct3 for immediate instructions where bit 30 only matters for
// SRAI. SLT/SLTU map to a subtraction: their result comes from the branch
// circuit. Combinational. The ALUOP meanings are read from the document's
// control table.
module alu_control
  import riscv_pkg::*;
(
  input  logic [1:0] aluop,
  input  logic [3:0] ctrl_in,
  output alu_sel_e   sel
);
  logic       b30;
  logic [2:0] f3;
  assign b30 = ctrl_in[3];
  assign f3  = ctrl_in[2:0];

  always_comb begin
    unique case (aluop)
      ALUOP_ADD:    sel = ALU_ADD;
      ALUOP_BRANCH: sel = ALU_SUB;
      default: begin
        unique case (f3)
          3'b000:  sel = (aluop == ALUOP_REG && b30) ? ALU_SUB : ALU_ADD;
          3'b001:  sel = ALU_SLL;
          3'b010:  sel = ALU_SUB;
          3'b011:  sel = ALU_SUB;
          3'b100:  sel = ALU_XOR;
          3'b101:  sel = b30 ? ALU_SRA : ALU_SRL;
          3'b110:  sel = ALU_OR;
          default: sel = ALU_AND;
        endcase
      end
    endcase
  end
endmodule
