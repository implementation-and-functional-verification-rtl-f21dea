// hazard_unit: load-use hazard detection in the decode stage. When the
// instruction in EX is a load whose rd (not x0) is a source of the
// instruction in decode, the loaded value will not exist until the end of
// MEM, so stall is raised for one cycle: PC and IF/ID hold and a bubble
// enters ID/EX, after which the stage-3 forwarding supplies the value. Store
// data (rs2 of a store) is exempt because the stage-4 forwarding unit covers
// it. A flush (taken branch in MEM) overrides the stall. Combinational.
module hazard_unit (
  input  logic [4:0] id_rs1,
  input  logic [4:0] id_rs2,
  input  logic       id_rs1f,
  input  logic       id_rs2f,
  input  logic       id_store,
  input  logic       ex_load,
  input  logic [4:0] ex_rd,
  input  logic       flush,
  output logic       stall
);
  logic dep1, dep2;
  assign dep1  = id_rs1f && (id_rs1 == ex_rd);
  assign dep2  = id_rs2f && !id_store && (id_rs2 == ex_rd);
  assign stall = !flush && ex_load && (ex_rd != 5'd0) && (dep1 || dep2);
endmodule
