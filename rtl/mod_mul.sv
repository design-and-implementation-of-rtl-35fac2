// mod_mul: modular product res = a * b mod n for an odd modulus n > 1 and
// operands a, b < n, using the Montgomery multiplier twice.
//
//   R2 : 2^(2W) mod n by 2W doublings with conditional subtraction
//   M1 : t   = Mont(a, b)  = a*b*R^-1 mod n
//   M2 : res = Mont(t, R2) = a*b mod n
//
// Interface: start pulse captures a, b and n; done pulses one cycle with
// res valid, res holds until the next start.
// Timing: 2W + 2(W + 2) cycles, about 4W.
// The DSA formulas need products "mod q" and "mod p"; computing them this
// way is this design's choice.
module mod_mul #(
  parameter int unsigned W = 160
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic [W-1:0] res,
  output logic         busy,
  output logic         done
);

  localparam int unsigned RCW = $clog2(2 * W + 1);

  typedef enum logic [1:0] {S_IDLE, S_R2, S_M1, S_M2} state_t;

  state_t         state;
  logic [W-1:0]   a_r, b_r, n_r, r2, t_r;
  logic [W-1:0]   t;
  logic [RCW-1:0] rcnt;
  logic           m_wait;

  logic         m_start, m_done, m_busy;
  logic [W-1:0] m_a, m_b, m_res;

  assign m_a     = (state == S_M2) ? t_r : a_r;
  assign m_b     = (state == S_M2) ? r2  : b_r;
  assign m_start = !m_wait && (state inside {S_M1, S_M2});

  mont_mul #(.W(W)) u_mont (
    .clk, .rst,
    .start(m_start), .a(m_a), .b(m_b), .n(n_r),
    .res(m_res), .busy(m_busy), .done(m_done)
  );

  logic [W:0] t2;
  always_comb begin
    t2 = {t, 1'b0};
    if (t2 >= {1'b0, n_r}) t2 = t2 - {1'b0, n_r};
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      m_wait <= 1'b0;
      a_r    <= '0;
      b_r    <= '0;
      n_r    <= '0;
      r2     <= '0;
      t_r    <= '0;
      t      <= '0;
      rcnt   <= '0;
      res    <= '0;
    end else begin
      done <= 1'b0;
      if (m_start) m_wait <= 1'b1;
      if (m_done)  m_wait <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_r   <= a;
          b_r   <= b;
          n_r   <= n;
          t     <= W'(1);
          rcnt  <= '0;
          state <= S_R2;
        end
        S_R2: begin
          t    <= t2[W-1:0];
          rcnt <= rcnt + 1'b1;
          if (rcnt == RCW'(2 * W - 1)) begin
            r2    <= t2[W-1:0];
            state <= S_M1;
          end
        end
        S_M1: if (m_done) begin
          t_r   <= m_res;
          state <= S_M2;
        end
        S_M2: if (m_done) begin
          res   <= m_res;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

  // the multiplier only runs for an operation this FSM is waiting on
  a_mont_owned: assert property (@(posedge clk) disable iff (rst) m_busy |-> m_wait);

endmodule
