// control_unit: main decoder of the core. From opcode, funct3 and funct7 it
// produces the control bundle (ctrl_t) used by the later stages: ALU operand
// selection (ALUsrc, PCToALU), ALUOP, register write, load size and
// extension (WHB, Id_sxt), store size (MemWrite), write-back source (ToReg),
// jump/branch kind (Branch, Uncond for JAL, Jmp_i for JALR), Cx for SLT/SLTU
// results, MULDIV for the M extension and Rs1f/Rs2f telling the hazard logic
// which source registers are read. Values follow the document's control
// table; unknown opcodes decode to a no-op. Combinational.
module control_unit
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];
  assign funct7 = instr[31:25];

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (opcode)
      OP_REG: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_ALU;
        ctrl.aluop    = ALUOP_REG;
        ctrl.rs1f     = 1'b1;
        ctrl.rs2f     = 1'b1;
        if (funct7 == 7'b0000001) ctrl.muldiv = 1'b1;
        else ctrl.cx = (funct3 == 3'b010) || (funct3 == 3'b011);
      end
      OP_IMM: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_ALU;
        ctrl.alusrc   = 1'b1;
        ctrl.rs1f     = 1'b1;
        // shift-immediates use ALUOP 00 (bit 30 selects SRAI), the rest 11
        ctrl.aluop    = (funct3 == 3'b001 || funct3 == 3'b101) ? ALUOP_REG : ALUOP_IMM;
        ctrl.cx       = (funct3 == 3'b010) || (funct3 == 3'b011);
      end
      OP_LUI: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_IMM;
      end
      OP_AUIPC: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_ALU;
        ctrl.aluop    = ALUOP_ADD;
        ctrl.alusrc   = 1'b1;
        ctrl.pctoalu  = 1'b1;
      end
      OP_JAL: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_PC4;
        ctrl.uncond   = 1'b1;
      end
      OP_JALR: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_PC4;
        ctrl.aluop    = ALUOP_ADD;
        ctrl.alusrc   = 1'b1;
        ctrl.jmp_i    = 1'b1;
        ctrl.rs1f     = 1'b1;
      end
      OP_LOAD: begin
        ctrl.regwrite = 1'b1;
        ctrl.toreg    = TOREG_MEM;
        ctrl.aluop    = ALUOP_ADD;
        ctrl.alusrc   = 1'b1;
        ctrl.rs1f     = 1'b1;
        ctrl.ld_sxt   = ~funct3[2];
        unique case (funct3[1:0])
          2'b00:   ctrl.whb = SZ_BYTE;
          2'b01:   ctrl.whb = SZ_HALF;
          default: ctrl.whb = SZ_WORD;
        endcase
      end
      OP_STORE: begin
        ctrl.aluop  = ALUOP_ADD;
        ctrl.alusrc = 1'b1;
        ctrl.rs1f   = 1'b1;
        ctrl.rs2f   = 1'b1;
        unique case (funct3[1:0])
          2'b00:   ctrl.memwrite = SZ_BYTE;
          2'b01:   ctrl.memwrite = SZ_HALF;
          default: ctrl.memwrite = SZ_WORD;
        endcase
      end
      OP_BRANCH: begin
        ctrl.aluop  = ALUOP_BRANCH;
        ctrl.branch = 1'b1;
        ctrl.rs1f   = 1'b1;
        ctrl.rs2f   = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end
endmodule
