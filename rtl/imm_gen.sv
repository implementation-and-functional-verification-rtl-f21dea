// imm_gen: immediate generator. Picks the immediate bits of the instruction
// according to its opcode and sign-extends them from instr[31]: I-type (loads,
// ALU immediates, JALR), S-type (stores), B-type (branches, bit 0 = 0),
// U-type (LUI, AUIPC: instr[31:12] << 12) and J-type (JAL, bit 0 = 0).
// Other opcodes give 0. Combinational; formats follow RV32I.
module imm_gen
  import riscv_pkg::*;
(
  input  logic [31:0] instr,
  output logic [31:0] imm
);
  always_comb begin
    unique case (instr[6:0])
      OP_LOAD, OP_IMM, OP_JALR: imm = {{20{instr[31]}}, instr[31:20]};
      OP_STORE:  imm = {{20{instr[31]}}, instr[31:25], instr[11:7]};
      OP_BRANCH: imm = {{19{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
      OP_LUI, OP_AUIPC: imm = {instr[31:12], 12'b0};
      OP_JAL:    imm = {{11{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};
      default:   imm = '0;
    endcase
  end
endmodule
