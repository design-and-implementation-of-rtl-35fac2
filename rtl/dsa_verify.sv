// dsa_verify: DSA signature verification.
//
//   w  = s^-1 mod q
//   u1 = H(M)*w mod q,  u2 = r*w mod q
//   v  = ((g^u1 * y^u2) mod p) mod q,   valid = (v == r)
//
// The unit runs one step at a time:
//   CHECK: reject unless 0 < r < q and 0 < s < q (valid = 0 at once)
//   W    : w  = s^(q-2) mod q         (mod_exp, Fermat inverse)
//   RED_H: hm = H mod q               (mod_reduce)
//   U1,U2: u1 = hm*w, u2 = r*w mod q  (mod_mul, Q_W bits)
//   GA,YB: a = g^u1, b = y^u2 mod p   (mod_exp, P_W-bit modulus)
//   AB   : t  = a*b mod p             (mod_mul, P_W bits)
//   RED_V: v  = t mod q               (mod_reduce)
// Requirements: p, q odd primes, q divides p-1, g, y < p.
//
// Interface: start pulse captures all operands; done pulses one cycle with
// valid, which holds until the next start.
// Timing (P_W = 512, Q_W = 160): about 0.27 M cycles, dominated by the two
// exponentiations mod p.
//
// The formulas and the v == r test are the document's; the range check is
// the standard's; the step order and the engines are this design's choice.
module dsa_verify #(
  parameter int unsigned P_W = crypto_pkg::DSA_P_W,
  parameter int unsigned Q_W = crypto_pkg::DSA_Q_W,
  parameter int unsigned H_W = crypto_pkg::DIGEST_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [P_W-1:0] p,
  input  logic [Q_W-1:0] q,
  input  logic [P_W-1:0] g,
  input  logic [P_W-1:0] y,
  input  logic [H_W-1:0] h,
  input  logic [Q_W-1:0] r,
  input  logic [Q_W-1:0] s,
  output logic           valid,
  output logic           busy,
  output logic           done
);

  typedef enum logic [3:0] {
    S_IDLE, S_CHECK, S_W, S_RED_H, S_U1, S_U2, S_GA, S_YB, S_AB, S_RED_V
  } state_t;

  state_t         state;
  logic           issued;
  logic [P_W-1:0] p_r, g_r, y_r, a_r, b_r;
  logic [Q_W-1:0] q_r, r_r, s_r, w_r, hm, u1, u2;
  logic [H_W-1:0] h_r;

  logic           ep_done, ep_busy, eq_done, eq_busy, rd_done, rd_busy;
  logic           mq_done, mq_busy, mp_done, mp_busy;
  logic [P_W-1:0] ep_res, ep_base, rd_x, mp_res;
  logic [Q_W-1:0] ep_exp, eq_res, rd_res, mq_res, mq_a;

  assign ep_base = (state == S_YB) ? y_r : g_r;
  assign ep_exp  = (state == S_YB) ? u2  : u1;

  mod_exp #(.W(P_W), .EW(Q_W)) u_exp_p (
    .clk, .rst, .start((state inside {S_GA, S_YB}) && !issued),
    .base(ep_base), .exp(ep_exp), .n(p_r),
    .res(ep_res), .busy(ep_busy), .done(ep_done)
  );

  mod_exp #(.W(Q_W), .EW(Q_W)) u_exp_q (
    .clk, .rst, .start(state == S_W && !issued),
    .base(s_r), .exp(q_r - Q_W'(2)), .n(q_r),
    .res(eq_res), .busy(eq_busy), .done(eq_done)
  );

  assign rd_x = (state == S_RED_H) ? P_W'(h_r) : mp_res;

  mod_reduce #(.XW(P_W), .NW(Q_W)) u_red (
    .clk, .rst, .start((state inside {S_RED_H, S_RED_V}) && !issued),
    .x(rd_x), .n(q_r),
    .res(rd_res), .busy(rd_busy), .done(rd_done)
  );

  assign mq_a = (state == S_U2) ? r_r : hm;

  mod_mul #(.W(Q_W)) u_mul_q (
    .clk, .rst, .start((state inside {S_U1, S_U2}) && !issued),
    .a(mq_a), .b(w_r), .n(q_r),
    .res(mq_res), .busy(mq_busy), .done(mq_done)
  );

  mod_mul #(.W(P_W)) u_mul_p (
    .clk, .rst, .start(state == S_AB && !issued),
    .a(a_r), .b(b_r), .n(p_r),
    .res(mp_res), .busy(mp_busy), .done(mp_done)
  );

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      issued <= 1'b0;
      done   <= 1'b0;
      valid  <= 1'b0;
      p_r    <= '0;
      g_r    <= '0;
      y_r    <= '0;
      a_r    <= '0;
      b_r    <= '0;
      q_r    <= '0;
      r_r    <= '0;
      s_r    <= '0;
      w_r    <= '0;
      hm     <= '0;
      u1     <= '0;
      u2     <= '0;
      h_r    <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE && state != S_CHECK) issued <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          p_r    <= p;
          q_r    <= q;
          g_r    <= g;
          y_r    <= y;
          h_r    <= h;
          r_r    <= r;
          s_r    <= s;
          valid  <= 1'b0;
          issued <= 1'b0;
          state  <= S_CHECK;
        end
        S_CHECK: begin
          issued <= 1'b0;
          if (r_r == '0 || r_r >= q_r || s_r == '0 || s_r >= q_r) begin
            valid <= 1'b0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_W;
          end
        end
        S_W:     if (eq_done) begin issued <= 1'b0; w_r <= eq_res; state <= S_RED_H; end
        S_RED_H: if (rd_done) begin issued <= 1'b0; hm  <= rd_res; state <= S_U1;    end
        S_U1:    if (mq_done) begin issued <= 1'b0; u1  <= mq_res; state <= S_U2;    end
        S_U2:    if (mq_done) begin issued <= 1'b0; u2  <= mq_res; state <= S_GA;    end
        S_GA:    if (ep_done) begin issued <= 1'b0; a_r <= ep_res; state <= S_YB;    end
        S_YB:    if (ep_done) begin issued <= 1'b0; b_r <= ep_res; state <= S_AB;    end
        S_AB:    if (mp_done) begin issued <= 1'b0; state <= S_RED_V; end
        S_RED_V: if (rd_done) begin
          issued <= 1'b0;
          valid  <= (rd_res == r_r);
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

  // the steps run one at a time: never two engines busy together
  a_one_engine: assert property (@(posedge clk) disable iff (rst)
                                 $onehot0({ep_busy, eq_busy, rd_busy, mq_busy, mp_busy}));

endmodule
