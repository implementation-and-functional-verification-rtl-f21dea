// tb_forward_unit_mem: exhaustive over small register numbers; FDATA must
// be set only for a store in MEM whose rs2 is written by the WB stage.
module tb_forward_unit_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] mem_rs2, wb_rd;
  logic mem_store, wb_regwrite, fdata;
  int checks = 0, failures = 0;

  forward_unit_mem dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int w = 0; w < 4; w++)
        for (int f = 0; f < 4; f++) begin
          mem_rs2 = 5'(r); wb_rd = 5'(w); {mem_store, wb_regwrite} = 2'(f);
          #1;
          checks++;
          if (fdata != (mem_store && wb_regwrite && w != 0 && w == r)) begin
            failures++; $display("FAIL: rs2=%0d rd=%0d f=%0d", r, w, f);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
