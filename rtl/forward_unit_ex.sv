// forward_unit_ex: stage-3 forwarding unit. Compares the source registers of
// the instruction in EX with the destination of the instructions in MEM
// (stage 4) and WB (stage 5) and drives the 4:1 operand multiplexers:
// 00 register-file value, 01 stage-4 ALU result, 10 stage-5 write-back data,
// 11 stage-4 PC+4 or LUI immediate (selected when its ToReg is 00 or 11).
// Stage 4 wins over stage 5; x0 is never forwarded; a load in stage 4 is not
// forwarded (the hazard unit has already stalled). Combinational. The source
// assignment of the mux inputs is this design's choice.
module forward_unit_ex
  import riscv_pkg::*;
(
  input  logic [4:0] ex_rs1,
  input  logic [4:0] ex_rs2,
  input  logic [4:0] mem_rd,
  input  logic       mem_regwrite,
  input  logic [1:0] mem_toreg,
  input  logic [4:0] wb_rd,
  input  logic       wb_regwrite,
  output logic [1:0] fa,
  output logic [1:0] fb
);
  function automatic logic [1:0] pick(input logic [4:0] rs);
    if (mem_regwrite && mem_rd != 5'd0 && mem_rd == rs && mem_toreg != TOREG_MEM)
      return (mem_toreg == TOREG_ALU) ? 2'b01 : 2'b11;
    else if (wb_regwrite && wb_rd != 5'd0 && wb_rd == rs)
      return 2'b10;
    else
      return 2'b00;
  endfunction

  assign fa = pick(ex_rs1);
  assign fb = pick(ex_rs2);
endmodule
