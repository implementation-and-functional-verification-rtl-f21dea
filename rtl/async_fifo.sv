// async_fifo: dual-clock FIFO of 2**AW words of W bits for crossing between
// clock domains. Write and read pointers are AW+1-bit binary counters kept
// also in Gray code; each Gray pointer crosses to the other domain through a
// sync_2ff, which is safe because only one bit changes per increment.
// empty (read domain): read Gray pointer equals synchronised write pointer.
// full (write domain): synchronised read pointer equals the write pointer
// with its two top bits inverted. Both flags are pessimistic by the
// synchronizer delay, so no overflow or underflow can occur. rdata shows the
// entry at the read pointer (first-word fall-through); rd pops it. Writes
// when full and reads when empty are ignored. Structure follows the
// document; depth and width are this design's parameters.
module async_fifo #(
  parameter int W  = 32,
  parameter int AW = 4
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wbin, wgray, rbin, rgray, wgray_r, rgray_w;
  logic [AW:0]  wbin_n, rbin_n;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write domain
  assign wbin_n = wbin + {{AW{1'b0}}, (wr && !full)};
  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= bin2gray(wbin_n);
    end
  end
  always_ff @(posedge wclk) begin
    if (wr && !full) mem[wbin[AW-1:0]] <= wdata;
  end
  sync_2ff #(.W(AW+1)) u_r2w (.clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_w));
  assign full = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});

  // read domain
  assign rbin_n = rbin + {{AW{1'b0}}, (rd && !empty)};
  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= bin2gray(rbin_n);
    end
  end
  sync_2ff #(.W(AW+1)) u_w2r (.clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_r));
  assign empty = (rgray == wgray_r);
  assign rdata = mem[rbin[AW-1:0]];
endmodule
