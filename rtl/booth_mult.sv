// booth_mult: sequential radix-2 Booth multiplier for N-bit two's-complement
// operands (N = 33: 32-bit register values with one extension bit).
// Registers A (accumulator), Q (multiplier) and q_1 form a shift register;
// each step looks at {Q[0], q_1}: 10 subtracts the multiplicand M from A,
// 01 adds it, then {A, Q, q_1} is shifted right arithmetically. The start
// cycle already performs step 1 on the incoming operands, N-1 further cycles
// do the remaining steps, and done is high for one cycle after that with the
// 2N-bit product on p: N+1 cycles from start to done (34 for N = 33).
// The add/subtract is one bit wider than A, so even M = -2^(N-1) works.
// cancel returns to idle. The algorithm follows the document; the step-in-
// start-cycle timing is this design's choice to meet the stated 34 cycles.
module booth_mult #(
  parameter int N = 33
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           cancel,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);
  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e state;

  logic [N-1:0] m_q, acc_q, q_q;
  logic         q1_q;
  logic [$clog2(N+1)-1:0] cnt;

  // one Booth step: returns {A, Q, q_1} after add/sub and arithmetic shift
  function automatic logic [2*N:0] booth_step(input logic [N-1:0] acc,
                                              input logic [N-1:0] q,
                                              input logic q1,
                                              input logic [N-1:0] m);
    logic [N:0] s;  // one guard bit so that A - M cannot overflow
    unique case ({q[0], q1})
      2'b10:   s = {acc[N-1], acc} - {m[N-1], m};
      2'b01:   s = {acc[N-1], acc} + {m[N-1], m};
      default: s = {acc[N-1], acc};
    endcase
    return {s, q};
  endfunction

  logic [2*N:0] st_first, st_next;
  assign st_first = booth_step('0, b, 1'b0, a);
  assign st_next  = booth_step(acc_q, q_q, q1_q, m_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      m_q <= '0; acc_q <= '0; q_q <= '0; q1_q <= 1'b0; cnt <= '0;
    end else if (cancel) begin
      state <= IDLE;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          m_q <= a;
          {acc_q, q_q, q1_q} <= st_first;
          cnt   <= 1;
          state <= RUN;
        end
        RUN: begin
          {acc_q, q_q, q1_q} <= st_next;
          cnt <= cnt + 1'b1;
          if (cnt == $bits(cnt)'(N - 1)) state <= DONE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);
  assign done = (state == DONE);
  assign p    = {acc_q, q_q};
endmodule
