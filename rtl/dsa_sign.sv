// dsa_sign: DSA signature generation.
//
//   r = (g^k mod p) mod q
//   s = k^-1 (H(M) + x*r) mod q
//
// The unit runs one step at a time, each on its own arithmetic engine:
//   GK   : t    = g^k mod p          (mod_exp, P_W-bit modulus)
//   RED_R: r    = t mod q            (mod_reduce)
//   KINV : kinv = k^(q-2) mod q      (mod_exp, Fermat inverse, q prime)
//   RED_H: hm   = H mod q            (mod_reduce)
//   XR   : xr   = x*r mod q          (mod_mul)
//   SUM  : sm   = hm + xr mod q      (add, conditional subtract)
//   SMUL : s    = kinv*sm mod q      (mod_mul)
// Requirements: p, q odd primes, q divides p-1, g < p, 0 < x < q, 0 < k < q.
//
// Interface: start pulse captures all operands; done pulses one cycle with
// r, s and err valid, held until the next start. err = 1 when r or s came
// out 0, in which case the standard asks for a new nonce k.
// Timing (P_W = 512, Q_W = 160): about 0.19 M cycles, dominated by g^k.
//
// The formulas are the document's. The nonce k is an input because the
// document names it a random nonce but gives no generator. The inverse by
// Fermat's little theorem and the step order are this design's choices.
module dsa_sign #(
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
  input  logic [Q_W-1:0] x,
  input  logic [Q_W-1:0] k,
  input  logic [H_W-1:0] h,
  output logic [Q_W-1:0] r,
  output logic [Q_W-1:0] s,
  output logic           err,
  output logic           busy,
  output logic           done
);

  typedef enum logic [2:0] {
    S_IDLE, S_GK, S_RED_R, S_KINV, S_RED_H, S_XR, S_SUM, S_SMUL
  } state_t;

  state_t         state;
  logic           issued;
  logic [P_W-1:0] p_r, g_r;
  logic [Q_W-1:0] q_r, x_r, k_r, kinv, hm, xr;
  logic [H_W-1:0] h_r;
  logic [Q_W-1:0] sum;

  // engines
  logic           ep_done, ep_busy, eq_done, eq_busy, rd_done, rd_busy, mm_done, mm_busy;
  logic [P_W-1:0] ep_res, rd_x;
  logic [Q_W-1:0] eq_res, rd_res, mm_res, mm_a, mm_b;

  mod_exp #(.W(P_W), .EW(Q_W)) u_exp_p (
    .clk, .rst, .start(state == S_GK && !issued),
    .base(g_r), .exp(k_r), .n(p_r),
    .res(ep_res), .busy(ep_busy), .done(ep_done)
  );

  mod_exp #(.W(Q_W), .EW(Q_W)) u_exp_q (
    .clk, .rst, .start(state == S_KINV && !issued),
    .base(k_r), .exp(q_r - Q_W'(2)), .n(q_r),
    .res(eq_res), .busy(eq_busy), .done(eq_done)
  );

  assign rd_x = (state == S_RED_H) ? P_W'(h_r) : ep_res;

  mod_reduce #(.XW(P_W), .NW(Q_W)) u_red (
    .clk, .rst, .start((state inside {S_RED_R, S_RED_H}) && !issued),
    .x(rd_x), .n(q_r),
    .res(rd_res), .busy(rd_busy), .done(rd_done)
  );

  assign mm_a = (state == S_SMUL) ? kinv : x_r;
  assign mm_b = (state == S_SMUL) ? sum : r;

  mod_mul #(.W(Q_W)) u_mul (
    .clk, .rst, .start((state inside {S_XR, S_SMUL}) && !issued),
    .a(mm_a), .b(mm_b), .n(q_r),
    .res(mm_res), .busy(mm_busy), .done(mm_done)
  );

  logic [Q_W:0] sum_raw;
  assign sum_raw = {1'b0, hm} + {1'b0, xr};
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      issued <= 1'b0;
      done   <= 1'b0;
      err    <= 1'b0;
      p_r    <= '0;
      g_r    <= '0;
      q_r    <= '0;
      x_r    <= '0;
      k_r    <= '0;
      h_r    <= '0;
      kinv   <= '0;
      hm     <= '0;
      xr     <= '0;
      sum    <= '0;
      r      <= '0;
      s      <= '0;
    end else begin
      done <= 1'b0;
      if (state != S_IDLE && state != S_SUM) issued <= 1'b1;
      unique case (state)
        S_IDLE: if (start) begin
          p_r    <= p;
          q_r    <= q;
          g_r    <= g;
          x_r    <= x;
          k_r    <= k;
          h_r    <= h;
          issued <= 1'b0;
          state  <= S_GK;
        end
        S_GK:    if (ep_done) begin issued <= 1'b0; state <= S_RED_R; end
        S_RED_R: if (rd_done) begin issued <= 1'b0; r <= rd_res; state <= S_KINV; end
        S_KINV:  if (eq_done) begin issued <= 1'b0; kinv <= eq_res; state <= S_RED_H; end
        S_RED_H: if (rd_done) begin issued <= 1'b0; hm <= rd_res; state <= S_XR; end
        S_XR:    if (mm_done) begin issued <= 1'b0; xr <= mm_res; state <= S_SUM; end
        S_SUM: begin
          sum    <= Q_W'((sum_raw >= {1'b0, q_r}) ? sum_raw - {1'b0, q_r} : sum_raw);
          issued <= 1'b0;
          state  <= S_SMUL;
        end
        S_SMUL: if (mm_done) begin
          issued <= 1'b0;
          s      <= mm_res;
          err    <= (r == '0) || (mm_res == '0);
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
                                 $onehot0({ep_busy, eq_busy, rd_busy, mm_busy}));

endmodule
