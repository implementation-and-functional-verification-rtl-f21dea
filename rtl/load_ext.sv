// load_ext: the load "memory circuit". The memory always delivers four bytes
// starting at the load address; this block keeps one byte (whb = 01), a
// halfword (10) or the whole word (11) and sign-extends it when ld_sxt is 1
// (LB, LH) or zero-extends it otherwise (LBU, LHU). Purely combinational.
// Function and control names follow the document; the circuit is this design's.
module load_ext (
  input  logic [31:0] din,
  input  logic [1:0]  whb,
  input  logic        ld_sxt,
  output logic [31:0] dout
);
  always_comb begin
    unique case (whb)
      2'b01:   dout = ld_sxt ? {{24{din[7]}},  din[7:0]}  : {24'b0, din[7:0]};
      2'b10:   dout = ld_sxt ? {{16{din[15]}}, din[15:0]} : {16'b0, din[15:0]};
      default: dout = din;
    endcase
  end
endmodule
