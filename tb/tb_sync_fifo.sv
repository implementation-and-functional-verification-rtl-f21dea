// tb_sync_fifo: random writes and reads against a queue model, checking
// data order, full/empty flags and the clear input.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, wr = 0, rd = 0, full, empty;
  logic [7:0] wdata, rdata;
  logic [7:0] q [$];
  int checks = 0, failures = 0;

  sync_fifo #(.W(8), .AW(3)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks += 2;
      if (full != (q.size() == 8) || empty != (q.size() == 0)) begin
        failures++; $display("FAIL: flags full=%0d empty=%0d n=%0d", full, empty, q.size());
      end
      if (!empty && rdata != q[0]) begin failures++; $display("FAIL: data %h exp %h", rdata, q[0]); end
      clr = (i % 997 == 500);
      wr = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30)) && !full;
      rd = ($urandom_range(0, 1) == 1) && !empty;
      wdata = 8'($urandom);
      @(posedge clk);
      if (clr) q.delete();
      else begin
        if (rd) void'(q.pop_front());
        if (wr) q.push_back(wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
