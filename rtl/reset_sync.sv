// reset_sync: asynchronous-assert, synchronous-deassert reset synchronizer,
// one per clock domain. When arst_n falls both flops clear at once, so reset
// reaches the domain immediately; when arst_n rises a 1 ripples through the
// two flops, so rst_n is released two clock edges later and aligned with the
// clock, avoiding recovery/removal violations. As described in the document.
module reset_sync (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);
  logic ff1;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      ff1   <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      ff1   <= 1'b1;
      rst_n <= ff1;
    end
  end
endmodule
