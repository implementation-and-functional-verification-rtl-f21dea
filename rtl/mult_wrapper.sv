// mult_wrapper: adapts the signed Booth multiplier to the four RV32M
// multiply instructions. Each 32-bit operand gets one extra top bit, its own
// sign when that operand is signed and 0 otherwise (MUL/MULH: both signed,
// MULHSU: rs1 signed, rs2 unsigned, MULHU: both unsigned), giving the two
// 33-bit Booth operands. Of the 66-bit product, bits [63:0] are kept; MUL
// returns the low word, the MULH forms the high word. Combinational.
// Follows the document's multiplication wrapper figure. Bits [31:0] of
// a_ext and b_ext are the operands unchanged; only the top bit is computed.
module mult_wrapper (
  input  logic [2:0]  funct3,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  output logic [32:0] a_ext,
  output logic [32:0] b_ext,
  input  logic [65:0] prod,
  output logic [31:0] result
);
  logic s1, s2;
  always_comb begin
    s1 = (funct3 == 3'b001) || (funct3 == 3'b010);  // MULH, MULHSU
    s2 = (funct3 == 3'b001);                          // MULH
    if (funct3 == 3'b000) begin  // MUL: low word is the same either way
      s1 = 1'b1;
      s2 = 1'b1;
    end
  end
  assign a_ext  = {s1 & rs1[31], rs1};
  assign b_ext  = {s2 & rs2[31], rs2};
  assign result = (funct3 == 3'b000) ? prod[31:0] : prod[63:32];
endmodule
