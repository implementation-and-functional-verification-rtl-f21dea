// alu: 32-bit arithmetic/logic unit of the execute stage.
// sel (ALU_select): 000 add, 001 sub, 010 sll, 011 xor, 100 srl, 101 sra,
// 110 or, 111 and; shifts use b[4:0]. The result is formed on 33 bits so that
// bit 32 is the carry (for subtraction: the borrow, 1 when a < b unsigned).
// Flags: zero, carry, sign (bit 31) and overflow = carry ^ a31 ^ b31 ^ y31,
// which is the signed overflow of a subtraction. The branch circuit uses the
// flags. Combinational. Operation codes and flags follow the document.
module alu
  import riscv_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_sel_e    sel,
  output logic [31:0] y,
  output logic        zero,
  output logic        carry,
  output logic        sign,
  output logic        overflow
);
  logic [32:0] r;

  always_comb begin
    unique case (sel)
      ALU_ADD: r = {1'b0, a} + {1'b0, b};
      ALU_SUB: r = {1'b0, a} - {1'b0, b};
      ALU_SLL: r = {1'b0, a << b[4:0]};
      ALU_XOR: r = {1'b0, a ^ b};
      ALU_SRL: r = {1'b0, a >> b[4:0]};
      ALU_SRA: r = {1'b0, 32'($signed(a) >>> b[4:0])};
      ALU_OR:  r = {1'b0, a | b};
      ALU_AND: r = {1'b0, a & b};
      default: r = '0;
    endcase
  end

  assign y        = r[31:0];
  assign zero     = (r[31:0] == '0);
  assign carry    = r[32];
  assign sign     = r[31];
  assign overflow = r[32] ^ a[31] ^ b[31] ^ r[31];
endmodule
