// branch_circuit: 8:1 multiplexer selected by funct3 over the ALU flags of a
// subtraction a - b. 000 beq: zero; 001 bne: !zero; 010 slt and 100 blt:
// less-than signed; 101 bge: its inverse; 011 sltu and 110 bltu: carry
// (borrow); 111 bgeu: !carry. The signed less-than is sign XOR overflow, the
// corrected form the document adopts after finding that the sign bit alone
// fails when the subtraction overflows. The same output provides the 0/1
// result of SLT/SLTU(I). Combinational.
module branch_circuit (
  input  logic [2:0] funct3,
  input  logic       zero,
  input  logic       carry,
  input  logic       sign,
  input  logic       overflow,
  output logic       cond
);
  logic lt;
  assign lt = sign ^ overflow;

  always_comb begin
    unique case (funct3)
      3'b000: cond = zero;
      3'b001: cond = ~zero;
      3'b010: cond = lt;
      3'b011: cond = carry;
      3'b100: cond = lt;
      3'b101: cond = ~lt;
      3'b110: cond = carry;
      default: cond = ~carry;
    endcase
  end
endmodule
