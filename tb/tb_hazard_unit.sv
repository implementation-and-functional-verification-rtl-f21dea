// tb_hazard_unit: random register numbers and flags against the load-use
// rule: stall when the instruction in EX is a load to a non-zero register
// read in ID (store data excepted, it is forwarded later), and never while
// a flush is asserted.
module tb_hazard_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0] id_rs1, id_rs2, ex_rd;
  logic id_rs1f, id_rs2f, id_store, ex_load, flush, stall, exp;
  int checks = 0, failures = 0;

  hazard_unit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      id_rs1 = 5'($urandom_range(0, 3)); id_rs2 = 5'($urandom_range(0, 3)); ex_rd = 5'($urandom_range(0, 3));
      {id_rs1f, id_rs2f, id_store, ex_load} = 4'($urandom);
      flush = ($urandom_range(0, 4) == 0);
      #1;
      exp = !flush && ex_load && ex_rd != 0 &&
            ((id_rs1f && id_rs1 == ex_rd) || (id_rs2f && !id_store && id_rs2 == ex_rd));
      checks++;
      if (stall != exp) begin failures++; $display("FAIL: case %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
