// tb_forward_unit_ex: random pipeline states; checks the FA/FB select
// codes (00 register file, 01 MEM ALU result, 10 WB data, 11 MEM PC+4 or
// immediate), the priority of the newer MEM result, x0 and the rule that
// a load in MEM is never forwarded from that stage.
module tb_forward_unit_ex;
  import riscv_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] ex_rs1, ex_rs2, mem_rd, wb_rd;
  logic mem_regwrite, wb_regwrite;
  logic [1:0] mem_toreg, fa, fb;
  int checks = 0, failures = 0;

  forward_unit_ex dut (.*);

  function automatic logic [1:0] model(input logic [4:0] rs);
    if (mem_regwrite && mem_rd == rs && rs != 0 && mem_toreg != TOREG_MEM)
      return mem_toreg == TOREG_ALU ? 2'b01 : 2'b11;
    if (wb_regwrite && wb_rd == rs && rs != 0) return 2'b10;
    return 2'b00;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      ex_rs1 = 5'($urandom_range(0, 3)); ex_rs2 = 5'($urandom_range(0, 3));
      mem_rd = 5'($urandom_range(0, 3)); wb_rd = 5'($urandom_range(0, 3));
      {mem_regwrite, wb_regwrite, mem_toreg} = 4'($urandom);
      #1;
      checks += 2;
      if (fa != model(ex_rs1)) begin failures++; $display("FAIL: fa case %0d", i); end
      if (fb != model(ex_rs2)) begin failures++; $display("FAIL: fb case %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
