// divider_fsm: N-bit unsigned shift-and-subtract divider controlled by a
// finite state machine.
//
// Restoring division, one quotient bit per clock. A working register pair
// {rem, qr} starts as {0, dividend}. Each step shifts the next dividend bit
// into the partial remainder, giving an (N+1)-bit value s = {rem, qr[N-1]},
// and tries s - divisor on an (N+1)-bit carry select adder (divisor
// inverted, carry-in 1): the divider shares the ALU's adder design instead
// of having a subtractor of its own. A carry out of 1 means s >= divisor:
// the difference becomes the new remainder and a 1 is shifted into the
// quotient; otherwise s is kept and a 0 is shifted in. After N steps qr
// holds the quotient and rem the remainder.
//
// States: IDLE (after reset, no result), RUN (N steps), DONE (result held).
// There is no start input: in IDLE or DONE the FSM latches the operands and
// starts whenever they differ from the ones it last divided (or after
// reset), so the results follow the operands like a combinational unit,
// N + 1 clock edges late. quotient/remainder keep the previous result until
// the new one is written on the last RUN edge.
// Timing: operands sampled at edge k are loaded at edge k, the results are
// registered at edge k + N; valid is high while the state is DONE and the
// operands equal the divided ones. busy is high in RUN.
// Division by zero needs no special case: it yields quotient = all ones and
// remainder = dividend. Start rule, latency, reset (asynchronous,
// active low) and divide-by-zero result are this design's own choices.
module divider_fsm #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         busy,
  output logic         valid
);

  typedef enum logic [1:0] {
    S_IDLE = 2'd0,
    S_RUN  = 2'd1,
    S_DONE = 2'd2
  } state_e;

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  state_e       state;
  logic [N-1:0] dvd_q, dvs_q;   // operands of the division in progress / done
  logic [N-1:0] rem, qr;        // partial remainder, dividend/quotient shifter
  logic [CW-1:0] cnt;           // steps left minus one

  logic [N:0]   shifted, trial, dvs_inv;
  logic         no_borrow;
  logic [N-1:0] rem_next, qr_next;
  logic         new_ops;

  always_comb begin
    shifted = {rem, qr[N-1]};
    dvs_inv = ~{1'b0, dvs_q};
  end

  // trial subtraction: shifted - divisor. Bit N of the difference is never
  // needed: when there is no borrow the difference is below the divisor.
  csa_adder #(.N(N + 1)) u_trial (
    .a   (shifted),
    .b   (dvs_inv),
    .cin (1'b1),
    .sum (trial),
    .cout(no_borrow)
  );

  always_comb begin
    rem_next = no_borrow ? trial[N-1:0] : shifted[N-1:0];
    qr_next  = {qr[N-2:0], no_borrow};
    new_ops  = (dividend != dvd_q) || (divisor != dvs_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      dvd_q     <= '0;
      dvs_q     <= '0;
      rem       <= '0;
      qr        <= '0;
      cnt       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (state == S_IDLE || new_ops) begin
            dvd_q <= dividend;
            dvs_q <= divisor;
            rem   <= '0;
            qr    <= dividend;
            cnt   <= CW'(N - 1);
            state <= S_RUN;
          end
        end
        S_RUN: begin
          rem <= rem_next;
          qr  <= qr_next;
          cnt <= cnt - 1'b1;
          if (cnt == '0) begin
            quotient  <= qr_next;
            remainder <= rem_next;
            state     <= S_DONE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    busy  = (state == S_RUN);
    valid = (state == S_DONE) && !new_ops;
  end

  // The partial remainder never reaches the divisor between steps (reset
  // forces IDLE, so the check is idle while reset is applied).
  assert property (@(posedge clk)
                   (state == S_RUN && dvs_q != '0) |-> (rem < dvs_q));

endmodule
