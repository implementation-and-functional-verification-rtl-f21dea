// forward_unit_mem: stage-4 forwarding unit. When the instruction in MEM is a
// store whose data register rs2 is the destination of the instruction in WB
// (for example a load immediately followed by a store of the loaded value),
// fdata selects the write-back data as store data instead of the value read
// in decode. x0 is never forwarded. Combinational.
module forward_unit_mem (
  input  logic [4:0] mem_rs2,
  input  logic       mem_store,
  input  logic [4:0] wb_rd,
  input  logic       wb_regwrite,
  output logic       fdata
);
  assign fdata = mem_store && wb_regwrite && (wb_rd != 5'd0) && (wb_rd == mem_rs2);
endmodule
