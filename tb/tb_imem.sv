// tb_imem: loads words through the load port and reads them back by byte
// address (pc), checking that the two low pc bits are ignored.
module tb_imem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] pc, instr, load_data;
  logic load_we;
  logic [15:0] load_addr;
  int checks = 0, failures = 0;
  logic [31:0] model [int];

  imem dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    load_we = 0; pc = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 16'($urandom); load_data = $urandom;
      model[load_addr] = load_data;
    end
    @(negedge clk) load_we = 0;
    foreach (model[k]) begin
      pc = {14'b0, 16'(k), 2'($urandom)};
      #1;
      checks++;
      if (instr != model[k]) begin failures++; $display("FAIL: word %0d = %h", k, instr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
