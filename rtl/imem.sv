// imem: instruction memory, 2**AW words of 32 bits (default 256 KB).
// Read is combinational at the word addressed by pc[AW+1:2], so a fetch takes
// one cycle; the two low pc bits are ignored since instructions are word
// aligned. A separate write port (load_*) fills the memory with a program
// while the core is held in reset. The size follows the document; the load
// port and the asynchronous read are choices of this design.
module imem #(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic [31:0]   pc,
  output logic [31:0]   instr,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [31:0]   load_data
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (load_we) mem[load_addr] <= load_data;
  end

  assign instr = mem[pc[AW+1:2]];
endmodule
