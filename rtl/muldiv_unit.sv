// muldiv_unit: M-extension execution unit of the EX stage. When an M
// instruction sits in EX (valid) it starts the Booth multiplier (funct3[2]=0)
// or the restoring divider (funct3[2]=1) through their wrappers and raises
// stall (MULDIV_enable) so the pipeline holds. When the selected unit is done,
// ready (MULDIV_ready) is high for one cycle with the 32-bit result and stall
// drops, letting the instruction leave EX: 34 cycles in EX in total. A flush
// from a taken branch has priority: it aborts the operation and stall is 0.
// The operands may arrive through forwarding paths that are gone a few
// cycles later, so funct3, rs1 and rs2 are captured when the operation
// starts; the wrappers' result correction (signs, division by zero) uses the
// captured copies. Capturing the operands is this design's choice.
module muldiv_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        flush,
  input  logic [2:0]  funct3,
  input  logic [31:0] rs1,
  input  logic [31:0] rs2,
  output logic        stall,
  output logic        ready,
  output logic [31:0] result
);
  logic [32:0] ma, mb, dn, dd, q, r;
  logic [65:0] prod;
  logic [31:0] mres, dres;
  logic m_busy, m_done, d_busy, d_done;
  logic go, is_div;

  assign is_div = funct3[2];
  assign go     = valid & ~flush & ~m_busy & ~m_done & ~d_busy & ~d_done;

  logic [2:0]  f3_q;
  logic [31:0] rs1_q, rs2_q;
  logic [32:0] unused_ma, unused_mb, unused_dn, unused_dd;
  logic [31:0] unused_mres, unused_dres;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f3_q <= '0; rs1_q <= '0; rs2_q <= '0;
    end else if (go) begin
      f3_q <= funct3; rs1_q <= rs1; rs2_q <= rs2;
    end
  end

  // operand side: live values at the start cycle
  mult_wrapper u_mw (.funct3, .rs1, .rs2, .a_ext(ma), .b_ext(mb), .prod, .result(unused_mres));
  // result side: captured values
  mult_wrapper u_mwr (.funct3(f3_q), .rs1(rs1_q), .rs2(rs2_q), .a_ext(unused_ma), .b_ext(unused_mb),
                      .prod, .result(mres));
  booth_mult #(.N(33)) u_mul (.clk, .rst_n, .start(go & ~is_div), .cancel(flush),
                              .a(ma), .b(mb), .busy(m_busy), .done(m_done), .p(prod));
  div_wrapper u_dw (.funct3, .rs1, .rs2, .dividend(dn), .divisor(dd), .quot(q), .rem(r),
                    .result(unused_dres));
  div_wrapper u_dwr (.funct3(f3_q), .rs1(rs1_q), .rs2(rs2_q), .dividend(unused_dn), .divisor(unused_dd),
                     .quot(q), .rem(r), .result(dres));
  restoring_div #(.N(33)) u_div (.clk, .rst_n, .start(go & is_div), .cancel(flush),
                                 .dividend(dn), .divisor(dd), .busy(d_busy), .done(d_done),
                                 .quot(q), .rem(r));

  assign ready  = valid & (is_div ? d_done : m_done);
  assign stall  = valid & ~flush & ~ready;
  assign result = is_div ? dres : mres;
endmodule
