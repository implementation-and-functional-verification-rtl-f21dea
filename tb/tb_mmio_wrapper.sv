// tb_mmio_wrapper: checks the address decoder. Random word/halfword/byte
// stores and loads in the memory region against a byte-array model; a UART
// byte sent at 0x40000 returns through a tx->rx loopback; the security
// module CSR at 0x8000C reads DO_empty; an access in region 3 sets the
// sticky address-error flag, and memory or UART accesses never do.
module tb_mmio_wrapper;
  logic clk = 0, uart_clk = 0, sec_clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  always #6 uart_clk = ~uart_clk;
  always #4 sec_clk = ~sec_clk;
  logic [31:0] addr = 0, wdata = 0, rdata;
  logic [1:0] mem_write = 0, whb = 0;
  logic re = 0, addr_error, line;
  logic [7:0] model [logic [31:0]];
  int checks = 0, failures = 0;

  mmio_wrapper #(.MEM_AW(10)) dut (.clk, .rst_n, .uart_clk, .uart_rst_n(rst_n), .sec_clk, .sec_rst_n(rst_n),
                                   .addr, .wdata, .mem_write, .re, .whb, .rdata, .addr_error,
                                   .rx(line), .tx(line));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic [31:0] a, input logic [1:0] sz, input logic [31:0] d);
    @(negedge clk); addr = a; mem_write = sz; wdata = d;
    @(negedge clk); mem_write = 0;
  endtask

  task automatic load(input logic [31:0] a, input logic [1:0] sz, output logic [31:0] d);
    @(negedge clk); addr = a; re = 1; whb = sz; #1 d = rdata;
    @(negedge clk); re = 0;
  endtask

  initial begin
    logic [31:0] v, e;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int a = 0; a < 64; a++) begin store(32'(a * 4), 2'b11, 0); for (int b = 0; b < 4; b++) model[32'(a*4+b)] = 0; end
    for (int i = 0; i < 400; i++) begin
      logic [31:0] a;
      logic [1:0] sz;
      a = 32'($urandom_range(0, 250));
      sz = 2'($urandom_range(1, 3));
      if ($urandom_range(0, 1)) begin
        v = $urandom;
        store(a, sz, v);
        for (int b = 0; b < (sz == 1 ? 1 : sz == 2 ? 2 : 4); b++) model[a + b] = v[8*b +: 8];
      end else begin
        load(a, 2'b11, v);
        e = {model[a+3], model[a+2], model[a+1], model[a]};
        checks++;
        if (v != e) begin failures++; $display("FAIL: mem[%h] = %h exp %h", a, v, e); end
      end
    end
    checks++;
    if (addr_error) begin failures++; $display("FAIL: address error from memory accesses"); end
    store(32'h40000, 2'b01, 32'h5a);
    do load(32'h40002, 2'b01, v); while (v[3]);
    load(32'h40001, 2'b01, v);
    checks++;
    if (v[7:0] != 8'h5a) begin failures++; $display("FAIL: uart loopback %h", v[7:0]); end
    load(32'h8000c, 2'b01, v);
    checks++;
    if (v[3] != 1) begin failures++; $display("FAIL: security CSR %h", v); end
    checks++;
    if (addr_error) begin failures++; $display("FAIL: address error from device accesses"); end
    load(32'hc0000, 2'b11, v);
    load(32'h00010, 2'b11, v);
    checks++;
    if (!addr_error) begin failures++; $display("FAIL: no sticky address error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
