// tb_regfile: writes random values to random registers and compares both
// read ports against a model array; checks that x0 stays zero and that a
// read of the register being written returns the new value (write-through).
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [4:0] raddr1, raddr2, waddr;
  logic [31:0] rdata1, rdata2, wdata;
  logic we;
  int checks = 0, failures = 0;
  logic [31:0] model [32];

  regfile dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr1 = 0; raddr2 = 0;
    foreach (model[i]) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 5'($urandom); wdata = $urandom;
      raddr1 = (n % 7 == 0) ? waddr : 5'($urandom);
      raddr2 = 5'($urandom);
      #1;
      check(rdata1 == ((raddr1 == 0) ? 0 : (we && waddr == raddr1) ? wdata : model[raddr1]),
            $sformatf("rd1 x%0d = %h", raddr1, rdata1));
      check(rdata2 == ((raddr2 == 0) ? 0 : (we && waddr == raddr2) ? wdata : model[raddr2]),
            $sformatf("rd2 x%0d = %h", raddr2, rdata2));
      @(posedge clk);
      if (we && waddr != 0) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
