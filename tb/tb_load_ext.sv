// tb_load_ext: all load sizes with and without sign extension on random data.
module tb_load_ext;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [31:0] din, dout, exp;
  logic [1:0] whb;
  logic ld_sxt;
  int checks = 0, failures = 0;

  load_ext dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      din = $urandom; whb = 2'($urandom_range(1, 3)); ld_sxt = 1'($urandom);
      #1;
      case (whb)
        1: exp = ld_sxt ? 32'($signed(din[7:0]))  : 32'(din[7:0]);
        2: exp = ld_sxt ? 32'($signed(din[15:0])) : 32'(din[15:0]);
        default: exp = din;
      endcase
      checks++;
      if (dout != exp) begin failures++; $display("FAIL: %h whb=%0d sx=%0d -> %h", din, whb, ld_sxt, dout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
