// sync_fifo: single-clock FIFO of 2**AW words of W bits, used inside the
// AEAD core as the bypass FIFO (output segment headers) and the aux FIFO
// (decrypted words held until the tag is verified). rdata shows the oldest
// entry (first-word fall-through); rd pops it, wr pushes wdata; clr empties
// the FIFO in one cycle (used to discard plaintext when authentication
// fails). Writes when full and reads when empty are ignored.
module sync_fifo #(
  parameter int W  = 32,
  parameter int AW = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic         empty
);
  logic [W-1:0] mem [2**AW];
  logic [AW:0]  wp, rp;

  assign empty = (wp == rp);
  assign full  = (wp == {~rp[AW], rp[AW-1:0]});
  assign rdata = mem[rp[AW-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else if (clr) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr && !full)  wp <= wp + 1'b1;
      if (rd && !empty) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr && !full && !clr) mem[wp[AW-1:0]] <= wdata;
  end
endmodule
