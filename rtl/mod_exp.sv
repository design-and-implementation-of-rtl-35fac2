// mod_exp: modular exponentiation res = base^exp mod n built on one
// Montgomery multiplier (mont_mul).
//
// Sequence after start:
//   1. R2    : 2^(2W) mod n by 2W doublings with a conditional subtraction
//              (one per cycle). This is the constant that moves operands
//              into the Montgomery domain.
//   2. XINIT : x = Mont(1, R2)    = R mod n   (Montgomery form of 1)
//   3. AINIT : a = Mont(base, R2) = base*R mod n
//   4. SCAN  : leading zero bits of exp are skipped, one per cycle.
//   5. SQ/MUL: left-to-right square-and-multiply, x = Mont(x,x) for every
//              remaining bit and x = Mont(x,a) when the bit is 1.
//   6. FINAL : res = Mont(x, 1), leaving the Montgomery domain.
// Requirements: n odd and n > 1, base < n. exp = 0 gives res = 1.
//
// Interface: start is a one-cycle pulse, operands are captured then; done
// pulses for one cycle with res valid, res holds until the next start.
// Timing: about 2W + (2 + S + M + 1)(W + 2) cycles, S = significant bits of
// exp, M = number of one bits in exp.
//
// The document uses Montgomery multiplication inside modular
// exponentiation for RSA and DSA; the square-and-multiply order, the R2
// precomputation and the leading-zero skip are this design's choices.
module mod_exp #(
  parameter int unsigned W  = 512,   // modulus width
  parameter int unsigned EW = 512    // exponent width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  base,
  input  logic [EW-1:0] exp,
  input  logic [W-1:0]  n,
  output logic [W-1:0]  res,
  output logic          busy,
  output logic          done
);

  localparam int unsigned RCW = $clog2(2 * W + 1);
  localparam int unsigned ECW = $clog2(EW + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_R2, S_XINIT, S_AINIT, S_SCAN, S_SQ, S_MUL, S_FINAL
  } state_t;

  state_t         state;
  logic [W-1:0]   n_r, base_r, r2, x, a_m;
  logic [W-1:0]   t;
  logic [RCW-1:0] rcnt;
  logic [EW-1:0]  e_sh;
  logic [ECW-1:0] erem;
  logic           m_wait;

  // Montgomery multiplier and its operand selection
  logic         m_start, m_done, m_busy;
  logic [W-1:0] m_a, m_b, m_res;

  always_comb begin
    m_a = x;
    m_b = x;
    unique case (state)
      S_XINIT: begin m_a = W'(1);  m_b = r2;  end
      S_AINIT: begin m_a = base_r; m_b = r2;  end
      S_SQ:    begin m_a = x;      m_b = x;   end
      S_MUL:   begin m_a = x;      m_b = a_m; end
      S_FINAL: begin m_a = x;      m_b = W'(1); end
      default: ;
    endcase
  end

  assign m_start = !m_wait &&
                   (state inside {S_XINIT, S_AINIT, S_SQ, S_MUL, S_FINAL});

  mont_mul #(.W(W)) u_mont (
    .clk, .rst,
    .start(m_start), .a(m_a), .b(m_b), .n(n_r),
    .res(m_res), .busy(m_busy), .done(m_done)
  );

  // one doubling step of the R2 computation
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
      n_r    <= '0;
      base_r <= '0;
      r2     <= '0;
      x      <= '0;
      a_m    <= '0;
      t      <= '0;
      rcnt   <= '0;
      e_sh   <= '0;
      erem   <= '0;
      res    <= '0;
    end else begin
      done <= 1'b0;
      if (m_start) m_wait <= 1'b1;
      if (m_done)  m_wait <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          n_r    <= n;
          base_r <= base;
          e_sh   <= exp;
          erem   <= ECW'(EW);
          t      <= W'(1);
          rcnt   <= '0;
          state  <= S_R2;
        end
        S_R2: begin
          t    <= t2[W-1:0];
          rcnt <= rcnt + 1'b1;
          if (rcnt == RCW'(2 * W - 1)) begin
            r2    <= t2[W-1:0];
            state <= S_XINIT;
          end
        end
        S_XINIT: if (m_done) begin
          x     <= m_res;
          state <= S_AINIT;
        end
        S_AINIT: if (m_done) begin
          a_m   <= m_res;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (erem == '0)            state <= S_FINAL;
          else if (e_sh[EW-1])       state <= S_SQ;
          else begin
            e_sh <= e_sh << 1;
            erem <= erem - 1'b1;
          end
        end
        S_SQ: if (m_done) begin
          x <= m_res;
          if (e_sh[EW-1]) state <= S_MUL;
          else begin
            e_sh  <= e_sh << 1;
            erem  <= erem - 1'b1;
            state <= (erem == ECW'(1)) ? S_FINAL : S_SQ;
          end
        end
        S_MUL: if (m_done) begin
          x     <= m_res;
          e_sh  <= e_sh << 1;
          erem  <= erem - 1'b1;
          state <= (erem == ECW'(1)) ? S_FINAL : S_SQ;
        end
        S_FINAL: if (m_done) begin
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
