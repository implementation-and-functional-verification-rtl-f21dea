// restoring_div: sequential unsigned restoring divider for N-bit operands
// (N = 33: 32-bit magnitudes with an appended zero). The remainder register R
// and quotient register Q form a shift register; each step shifts {R, Q} left
// by one, subtracts the divisor from R and, if the result is negative,
// restores R and shifts in a 0 quotient bit, else keeps the difference and
// shifts in a 1. The start cycle performs step 1, N-1 more cycles follow, and
// done is high for one cycle with quot and rem valid: N+1 cycles (34).
// Division by zero yields an all-ones quotient and rem = dividend. cancel
// returns to idle. Algorithm as in the document; timing is this design's.
module restoring_div #(
  parameter int N = 33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         cancel,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quot,
  output logic [N-1:0] rem
);
  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e state;

  logic [N-1:0] d_q, r_q, q_q;
  logic [$clog2(N+1)-1:0] cnt;

  // one restoring step: returns {R, Q}
  function automatic logic [2*N-1:0] div_step(input logic [N-1:0] r,
                                              input logic [N-1:0] q,
                                              input logic [N-1:0] d);
    logic [N:0] sh, diff;
    sh   = {r, q[N-1]};
    diff = sh - {1'b0, d};
    if (diff[N]) return {sh[N-1:0], q[N-2:0], 1'b0};   // negative: restore
    else         return {diff[N-1:0], q[N-2:0], 1'b1};
  endfunction

  logic [2*N-1:0] st_first, st_next;
  assign st_first = div_step('0, dividend, divisor);
  assign st_next  = div_step(r_q, q_q, d_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      d_q <= '0; r_q <= '0; q_q <= '0; cnt <= '0;
    end else if (cancel) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          d_q <= divisor;
          {r_q, q_q} <= st_first;
          cnt   <= 1;
          state <= RUN;
        end
        RUN: begin
          {r_q, q_q} <= st_next;
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(N - 1)) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);
  assign done = (state == DONE);
  assign quot = q_q;
  assign rem  = r_q;
endmodule
