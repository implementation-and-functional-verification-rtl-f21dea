// tb_dmem: random byte/halfword/word stores at any byte address (also across
// a word boundary) against a byte-array model; every read returns the four
// bytes that start at the byte address, little-endian.
module tb_dmem;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [17:0] addr;
  logic [31:0] rdata, wdata;
  logic [1:0] mem_write;
  int checks = 0, failures = 0;
  logic [7:0] model [int];

  dmem #(.AW(16)) dut (.*);

  function automatic logic [7:0] mb(input int a);
    return model.exists(a) ? model[a] : 8'h00;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_write = 0; addr = 0; wdata = 0;
    // clear the region used
    for (int w = 0; w < 64; w++) begin
      @(negedge clk); addr = 18'(w * 4); wdata = 0; mem_write = 2'b11;
    end
    for (int a = 0; a < 256; a++) model[a] = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 18'($urandom_range(0, 240));
      wdata = $urandom;
      mem_write = 2'($urandom);
      #1;
      checks++;
      if (rdata != {mb(addr+3), mb(addr+2), mb(addr+1), mb(addr)}) begin
        failures++; $display("FAIL: read @%0d = %h", addr, rdata);
      end
      @(posedge clk);
      for (int b = 0; b < 4; b++)
        if ((mem_write == 1 && b < 1) || (mem_write == 2 && b < 2) || (mem_write == 3))
          model[int'(addr) + b] = wdata[8*b +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
