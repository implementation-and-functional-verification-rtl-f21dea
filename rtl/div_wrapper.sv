// div_wrapper: adapts the unsigned restoring divider to DIV, DIVU, REM, REMU.
// For the signed forms (funct3 100, 110) negative operands are replaced by
// their two's complement; both magnitudes get an appended zero top bit. On
// the way back the quotient is negated when the operand signs differ and the
// remainder takes the sign of the dividend. A zero divisor gives quotient -1
// and remainder = rs1, as RV32M requires (this case is not in the document).
// Combinational. Sign handling follows the document's division wrapper.
module div_wrapper (
  input  logic [2:0]  funct3,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  output logic [32:0] dividend,
  output logic [32:0] divisor,
  input  logic [32:0] quot,
  input  logic [32:0] rem,
  output logic [31:0] result
);
  logic sgn, neg1, neg2;
  logic [31:0] q_s, r_s;
  assign sgn  = ~funct3[0];                 // DIV (100), REM (110)
  assign neg1 = sgn & rs1[31];
  assign neg2 = sgn & rs2[31];
  assign dividend = {1'b0, neg1 ? -rs1 : rs1};
  assign divisor  = {1'b0, neg2 ? -rs2 : rs2};

  always_comb begin
    q_s = (neg1 ^ neg2) ? -quot[31:0] : quot[31:0];
    r_s = neg1 ? -rem[31:0] : rem[31:0];
    if (rs2 == '0) begin
      q_s = '1;
      r_s = rs1;
    end
    result = funct3[1] ? r_s : q_s;
  end
endmodule
