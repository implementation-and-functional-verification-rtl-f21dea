// regfile: 32 x 32-bit integer register file of the core.
// Two combinational read ports and one write port clocked on the rising edge.
// Register x0 always reads zero and ignores writes. A read of the register
// being written in the same cycle returns the new value (write-through), so
// an instruction in decode sees the result of the instruction in write-back;
// this bypass is a choice of this design. Reset clears all registers.
module regfile #(
  parameter int XLEN = 32,
  parameter int NREG = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [$clog2(NREG)-1:0] raddr1,
  input  logic [$clog2(NREG)-1:0] raddr2,
  output logic [XLEN-1:0]         rdata1,
  output logic [XLEN-1:0]         rdata2,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [XLEN-1:0]         wdata
);
  logic [XLEN-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata1 = (raddr1 == '0) ? '0 : (we && waddr == raddr1) ? wdata : regs[raddr1];
    rdata2 = (raddr2 == '0) ? '0 : (we && waddr == raddr2) ? wdata : regs[raddr2];
  end
endmodule
