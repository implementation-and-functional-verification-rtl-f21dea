// sync_2ff: two-flop synchronizer. The input d, which comes from another
// clock domain, is registered twice in this domain; the first flop may go
// metastable but has a full cycle to settle before the second samples it.
// Safe for a single bit or for a Gray-coded value that changes one bit at a
// time (the FIFO pointers). Output latency 2 cycles. Reset value RST_VAL.
module sync_2ff #(
  parameter int           W       = 1,
  parameter logic [W-1:0] RST_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
