// baud_gen: baud-rate generator. A counter runs from 0 to DIV-1 and emits a
// one-cycle enable pulse, tick, each time it wraps, i.e. at clk/DIV. DIV is
// chosen so the tick rate is 16x the baud rate; the tick is an enable for the
// UART transmitter and receiver, not a clock, so the UART stays in one clock
// domain (as the document requires). DIV's default assumes a 50 MHz UART
// clock and 115200 baud; the document gives no rate.
module baud_gen #(
  parameter int DIV = 27
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  logic [$clog2(DIV)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                         cnt <= '0;
    else if (cnt == $bits(cnt)'(DIV-1)) cnt <= '0;
    else                                cnt <= cnt + 1'b1;
  end

  assign tick = (cnt == $bits(cnt)'(DIV-1));
endmodule
