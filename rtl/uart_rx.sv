// uart_rx: UART receiver with 16x oversampling. rx first passes a two-flop
// synchronizer. In idle a falling edge starts the start state; after
// SB_TICK/2 ticks (the middle of the start bit) it moves to data and then
// samples every SB_TICK ticks, i.e. in the middle of each bit, shifting the
// sample in as the MSB while the register shifts right, so the first (LSB)
// bit ends at bit 0. After DBIT bits it waits one stop bit and pulses
// rx_done_tick with the byte on dout. States follow the document.
module uart_rx #(
  parameter int DBIT    = 8,
  parameter int SB_TICK = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            rx,
  input  logic            s_tick,
  output logic            rx_done_tick,
  output logic [DBIT-1:0] dout
);
  typedef enum logic [1:0] {IDLE = 2'b00, START = 2'b01, DATA = 2'b10, STOP = 2'b11} state_e;
  state_e state;
  logic [$clog2(SB_TICK)-1:0] s_cnt;
  logic [$clog2(DBIT)-1:0]    n_cnt;
  logic [DBIT-1:0]            sh;
  logic                       rx_s;

  sync_2ff #(.W(1), .RST_VAL(1'b1)) u_sync (.clk, .rst_n, .d(rx), .q(rx_s));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; s_cnt <= '0; n_cnt <= '0; sh <= '0; rx_done_tick <= 1'b0;
    end else begin
      rx_done_tick <= 1'b0;
      unique case (state)
        IDLE: if (!rx_s) begin
          state <= START; s_cnt <= '0;
        end
        START: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK/2 - 1)) begin
            s_cnt <= '0; n_cnt <= '0; state <= DATA;
          end else s_cnt <= s_cnt + 1'b1;
        end
        DATA: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK-1)) begin
            s_cnt <= '0;
            sh    <= {rx_s, sh[DBIT-1:1]};
            if (n_cnt == $bits(n_cnt)'(DBIT-1)) state <= STOP;
            else n_cnt <= n_cnt + 1'b1;
          end else s_cnt <= s_cnt + 1'b1;
        end
        STOP: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK-1)) begin
            state <= IDLE; rx_done_tick <= 1'b1;
          end else s_cnt <= s_cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign dout = sh;
endmodule
