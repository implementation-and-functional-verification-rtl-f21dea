// tb_sec_module: runs the encryption and then the decryption of the test
// vector (key 55..64, nonce b0..bf, AD a0..af, message "Mentor Graphics")
// purely through bus accesses, as software would: word stores to PDI/SDI
// with polling of the full flags, polling of DO_empty (CSR bit 3) and word
// loads of DO. One PDI word is assembled with byte stores and pushed with
// the CSR write bit. The core and cipher clocks are unrelated.
module tb_sec_module;
  logic clk = 0, sec_clk = 0, rst_n = 0, sec_rst_n = 0;
  always #5 clk = ~clk;
  always #4.1 sec_clk = ~sec_clk;
  logic sel = 0, re = 0;
  logic [3:0] addr = 0;
  logic [1:0] we = 0, whb = 0;
  logic [31:0] wdata = 0, rdata;
  int checks = 0, failures = 0;

  sec_module dut (.*);

  localparam logic [31:0] KEY[4] = '{32'h55565758, 32'h595a5b5c, 32'h5d5e5f60, 32'h61626364};
  localparam logic [31:0] NPUB[4] = '{32'hb0b1b2b3, 32'hb4b5b6b7, 32'hb8b9babb, 32'hbcbdbebf};
  localparam logic [31:0] AD[4] = '{32'ha0a1a2a3, 32'ha4a5a6a7, 32'ha8a9aaab, 32'hacadaeaf};
  localparam logic [31:0] MSG[4] = '{32'h4d656e74, 32'h6f722047, 32'h72617068, 32'h69637300};
  localparam logic [31:0] CT[4] = '{32'h23604eff, 32'h0972a461, 32'h2d5f2d2f, 32'h4026cf00};
  localparam logic [31:0] TAG[4] = '{32'hab5a1f55, 32'h5facc365, 32'hc4ed4c9c, 32'h260234d3};

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store(input logic [3:0] a, input logic [1:0] sz, input logic [31:0] d);
    @(negedge clk); sel = 1; addr = a; we = sz; wdata = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  task automatic load(input logic [3:0] a, input logic [1:0] sz, output logic [31:0] d);
    @(negedge clk); sel = 1; addr = a; re = 1; whb = sz; #1 d = rdata;
    @(negedge clk); sel = 0; re = 0; whb = 0;
  endtask

  task automatic push(input logic [3:0] a, input logic [31:0] d);
    logic [31:0] c;
    do load(4'd12, 2'b01, c); while (c[a == 0 ? 5 : 4]);
    store(a, 2'b11, d);
  endtask

  task automatic drain(input logic [31:0] exp[$], input string what);
    logic [31:0] c, d;
    foreach (exp[i]) begin
      int spin = 0;
      do begin load(4'd12, 2'b01, c); spin++; end while (c[3] && spin < 20000);
      load(4'd8, 2'b11, d);
      checks++;
      if (d != exp[i]) begin failures++; $display("FAIL: %s word %0d = %h exp %h", what, i, d, exp[i]); end
    end
  endtask

  task automatic common(input logic [31:0] op);
    push(4, 32'h40000000); push(4, 32'hc7000010);
    foreach (KEY[i]) push(4, KEY[i]);
    push(0, 32'h70000000); push(0, op); push(0, 32'hd2000010);
    foreach (NPUB[i]) push(0, NPUB[i]);
    push(0, 32'h12000010);
    foreach (AD[i]) push(0, AD[i]);
  endtask

  initial begin
    logic [31:0] exp[$], v;
    repeat (3) @(negedge clk); rst_n = 1; sec_rst_n = 1;
    load(4'd12, 2'b01, v);
    checks++;
    if (v[7:0] != 8'h08) begin failures++; $display("FAIL: reset CSR %h", v); end
    // encryption; the message header is built byte by byte
    common(32'h20000000);
    store(4'd3, 2'b01, 32'h47); store(4'd0, 2'b01, 32'h0f);
    store(4'd1, 2'b10, 32'h0000);
    load(4'd0, 2'b11, v);
    checks++;
    if (v != 32'h4700000f) begin failures++; $display("FAIL: PDI assembled %h", v); end
    store(4'd12, 2'b01, 32'h04);
    foreach (MSG[i]) push(0, MSG[i]);
    exp = '{32'h5700000f};
    foreach (CT[i]) exp.push_back(CT[i]);
    exp.push_back(32'h83000010);
    foreach (TAG[i]) exp.push_back(TAG[i]);
    exp.push_back(32'he0000000);
    drain(exp, "enc");
    // decryption
    common(32'h30000000);
    push(0, 32'h5200000f);
    foreach (CT[i]) push(0, CT[i]);
    push(0, 32'h83000010);
    foreach (TAG[i]) push(0, TAG[i]);
    exp = '{32'h4200000f};
    foreach (MSG[i]) exp.push_back(MSG[i]);
    exp.push_back(32'he0000000);
    drain(exp, "dec");
    repeat (50) @(negedge clk);
    load(4'd12, 2'b01, v);
    checks++;
    if (!v[3]) begin failures++; $display("FAIL: DO not empty at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
