// uart_tx: UART transmitter, a four-state FSM (idle, start, data, stop) with
// a shift register. tx idles high. On tx_start in idle the byte din is loaded
// and tx goes low for one bit time (start bit), then the DBIT data bits are
// sent LSB first by shifting right, then tx is high for one stop bit, after
// which tx_done_tick pulses for one cycle. A bit time is SB_TICK (16)
// s_tick enables from the baud generator. busy is high outside idle.
// States and shifting follow the document; one stop bit is assumed.
module uart_tx #(
  parameter int DBIT    = 8,
  parameter int SB_TICK = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tx_start,
  input  logic            s_tick,
  input  logic [DBIT-1:0] din,
  output logic            tx_done_tick,
  output logic            tx,
  output logic            busy
);
  typedef enum logic [1:0] {IDLE = 2'b00, START = 2'b01, DATA = 2'b10, STOP = 2'b11} state_e;
  state_e state;
  logic [$clog2(SB_TICK)-1:0] s_cnt;
  logic [$clog2(DBIT)-1:0]    n_cnt;
  logic [DBIT-1:0]            sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; s_cnt <= '0; n_cnt <= '0; sh <= '0; tx <= 1'b1;
      tx_done_tick <= 1'b0;
    end else begin
      tx_done_tick <= 1'b0;
      unique case (state)
        IDLE: begin
          tx <= 1'b1;
          if (tx_start) begin
            sh <= din; s_cnt <= '0; state <= START; tx <= 1'b0;
          end
        end
        START: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK-1)) begin
            s_cnt <= '0; n_cnt <= '0; state <= DATA; tx <= sh[0];
          end else s_cnt <= s_cnt + 1'b1;
        end
        DATA: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK-1)) begin
            s_cnt <= '0;
            sh    <= {1'b0, sh[DBIT-1:1]};
            if (n_cnt == $bits(n_cnt)'(DBIT-1)) begin
              state <= STOP; tx <= 1'b1;
            end else begin
              n_cnt <= n_cnt + 1'b1; tx <= sh[1];
            end
          end else s_cnt <= s_cnt + 1'b1;
        end
        STOP: if (s_tick) begin
          if (s_cnt == $bits(s_cnt)'(SB_TICK-1)) begin
            state <= IDLE; tx_done_tick <= 1'b1;
          end else s_cnt <= s_cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);
endmodule
