// dmem: data memory, 2**AW words of 32 bits (default 256 KB), with the
// two-word access wrapper. A read fetches the word holding the byte address
// and the following word, joins them into 64 bits and returns the four bytes
// that start at the byte address, so halfwords and words need not be aligned.
// Stores of a byte, halfword or word (mem_write 01/10/11) are written on the
// rising clock edge through byte enables spread over the same two words.
// Read is combinational. Bytes are little-endian. The two-word scheme follows
// the document's memory wrapper; store straddling is this design's addition.
module dmem #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic [AW+1:0] addr,
  output logic [31:0]   rdata,
  input  logic [1:0]    mem_write,
  input  logic [31:0]   wdata
);
  logic [31:0] mem [2**AW];

  logic [AW-1:0] wa0, wa1;
  logic [1:0]    ofs;
  logic [63:0]   win;
  logic [7:0]    be;
  logic [63:0]   wwin;

  assign wa0 = addr[AW+1:2];
  assign wa1 = wa0 + 1'b1;
  assign ofs = addr[1:0];
  assign win = {mem[wa1], mem[wa0]};
  assign rdata = 32'(win >> (8 * ofs));

  always_comb begin
    unique case (mem_write)
      2'b01:   be = 8'b0000_0001 << ofs;
      2'b10:   be = 8'b0000_0011 << ofs;
      2'b11:   be = 8'b0000_1111 << ofs;
      default: be = 8'b0;
    endcase
    wwin = 64'(wdata) << (8 * ofs);
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < 4; b++) begin
      if (be[b])     mem[wa0][8*b +: 8] <= wwin[8*b +: 8];
      if (be[b + 4]) mem[wa1][8*b +: 8] <= wwin[32 + 8*b +: 8];
    end
  end
endmodule
