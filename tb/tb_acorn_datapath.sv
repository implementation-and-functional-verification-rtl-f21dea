// tb_acorn_datapath: known-answer test of the ACORN state update. From a
// cleared state, 64 byte-steps with fixed input bytes and ca/cb patterns
// are applied and each output byte is compared with values computed
// independently from the published bit-level cipher equations. A second
// instance in decrypt mode is fed the first one's output and must return
// the original bytes while its state stays in step.
module tb_acorn_datapath;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, en = 0, ca, cb;
  logic [7:0] din, dout, dout_d;
  int checks = 0, failures = 0;

  localparam logic [511:0] DIN = 512'h16271c961c62cfad7733c4afb23669991bc6e827bc002ed462c0e6de98a27e3fab0120b3a7fab9b85869f5884aea3f20c8d8c43cdf5070575b2eefaec70eac3d;
  localparam logic [511:0] OUT = 512'h16271c961c62cfad7733c4afa2b4681d19aced21f2ea5f0dbee1e1e74c345fe088ad229738778907f81e1754c10b8764d9f1bc14394832db7d1663d9ed034593;
  localparam logic [255:0] CC  = 256'h2011212221122223313232112013201033332213022132002300123031123333;

  acorn_datapath u_enc (.clk, .rst_n, .clr, .en, .din, .ca, .cb, .dec(1'b0), .dout);
  acorn_datapath u_dec (.clk, .rst_n, .clr, .en, .din(dout), .ca, .cb, .dec(1'b1), .dout(dout_d));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < 64; i++) begin
      din = DIN[511 - 8*i -: 8];
      {ca, cb} = 2'(CC[255 - 4*i -: 4]);
      en = 1;
      #1;
      checks += 2;
      if (dout != OUT[511 - 8*i -: 8]) begin failures++; $display("FAIL: byte %0d %h exp %h", i, dout, OUT[511 - 8*i -: 8]); end
      if (dout_d != din) begin failures++; $display("FAIL: decrypt byte %0d %h exp %h", i, dout_d, din); end
      @(negedge clk);
    end
    en = 0;
    // en low holds the state: same input gives same output twice
    din = 8'h00; ca = 1; cb = 1; #1;
    begin
      logic [7:0] o1;
      o1 = dout;
      @(negedge clk); #1;
      checks++;
      if (dout != o1) begin failures++; $display("FAIL: state moved with en low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
