// crypto_top: hybrid RSA / DSA / SHA-1 cryptographic processor.
//
// Sender side (mode = 0): the plaintext M on data_in is encrypted with the
// receiver's RSA public key, C = M^e mod n; M is hashed with SHA-1; the
// digest is signed with DSA using the sender's private key x and the nonce
// k, giving (r, s). Outputs: data_out = C, r_out = r, s_out = s.
// Receiver side (mode = 1): the received C on data_in and (r, s) on r_in /
// s_in are taken in; C is decrypted with the private key d, M = C^d mod n;
// the recovered M is hashed again; (r, s) is verified against that digest
// with the sender's public key y. Outputs: data_out = M, r_out / s_out echo
// the received r and s, valid = 1 if v == r.
//
// Each side has its own RSA unit, SHA-1 engine and DSA unit; crypto_ctrl
// sequences both sides (RSA, then SHA-1, then DSA). The two sides are
// independent, so one device can sign an outgoing message while checking
// an incoming one; mode only selects which side drives the outputs.
//
// Interface: start (one cycle) starts the side selected by mode; start_r
// starts the receiver whatever the mode. data_in, r_in and s_in are
// captured on the start cycle. Keys must be held stable while a side is
// busy. done rises when the selected side finishes and stays high until it
// is started again. err reports an RSA operand rejected (data_in >= n or n
// even) on the selected side, or a DSA signature with r = 0 or s = 0 (a new
// k is then needed). r_out and s_out are data-bus wide; r and s occupy
// their low DSA_Q_W bits.
// Timing (defaults): a sender run with e = 65537 takes about 0.2 M cycles,
// a receiver run with a 512-bit d about 0.7 M cycles.
//
// The blocks, the sequence, the two modes, the port names clk, reset,
// start, start_r, data_in, data_out, r_out, s_out, valid and done and the
// 512-bit buses follow the document. Key ports, r_in / s_in, err, the
// 512-bit p and the overlap of the two sides are this design's choices.
module crypto_top #(
  parameter int unsigned DATA_W = crypto_pkg::RSA_W,
  parameter int unsigned P_W    = crypto_pkg::DSA_P_W,
  parameter int unsigned Q_W    = crypto_pkg::DSA_Q_W
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              mode,      // 0 = sender, 1 = receiver
  input  logic              start,
  input  logic              start_r,
  input  logic [DATA_W-1:0] data_in,
  input  logic [Q_W-1:0]    r_in,
  input  logic [Q_W-1:0]    s_in,
  // RSA key of the receiver
  input  logic [DATA_W-1:0] rsa_n,
  input  logic [DATA_W-1:0] rsa_e,
  input  logic [DATA_W-1:0] rsa_d,
  // DSA domain parameters and keys of the sender
  input  logic [P_W-1:0]    dsa_p,
  input  logic [Q_W-1:0]    dsa_q,
  input  logic [P_W-1:0]    dsa_g,
  input  logic [Q_W-1:0]    dsa_x,
  input  logic [P_W-1:0]    dsa_y,
  input  logic [Q_W-1:0]    dsa_k,
  // results
  output logic [DATA_W-1:0] data_out,
  output logic [DATA_W-1:0] r_out,
  output logic [DATA_W-1:0] s_out,
  output logic [159:0]      digest,
  output logic              valid,
  output logic              err,
  output logic              done
);

  logic go_s, go_r;
  assign go_s = start && !mode;
  assign go_r = start_r || (start && mode);

  // control
  logic rsa_enc_start, sha_s_start, sign_start, busy_s, done_s;
  logic rsa_dec_start, sha_r_start, verify_start, busy_r, done_r;
  logic rsa_enc_done, sha_s_done, sign_done, rsa_dec_done, sha_r_done, verify_done;
  crypto_pkg::sender_state_t   state_s;
  crypto_pkg::receiver_state_t state_r;

  crypto_ctrl u_ctrl (
    .clk, .rst(reset),
    .start_s(go_s), .rsa_enc_done, .sha_s_done, .sign_done,
    .rsa_enc_start, .sha_s_start, .sign_start, .busy_s, .done_s, .state_s,
    .start_r(go_r), .rsa_dec_done, .sha_r_done, .verify_done,
    .rsa_dec_start, .sha_r_start, .verify_start, .busy_r, .done_r, .state_r
  );

  // input capture
  logic [DATA_W-1:0] msg_s, ct_r;
  logic [Q_W-1:0]    r_rx, s_rx;

  always_ff @(posedge clk) begin
    if (reset) begin
      msg_s <= '0;
      ct_r  <= '0;
      r_rx  <= '0;
      s_rx  <= '0;
    end else begin
      if (go_s && !busy_s) msg_s <= data_in;
      if (go_r && !busy_r) begin
        ct_r <= data_in;
        r_rx <= r_in;
        s_rx <= s_in;
      end
    end
  end

  // ---------------- sender module ----------------
  logic [DATA_W-1:0] ct_s;
  logic [159:0]      dig_s;
  logic [Q_W-1:0]    sig_r, sig_s;
  logic              enc_err, sign_err, enc_busy, sha_s_busy, sign_busy;

  rsa_core #(.W(DATA_W)) u_rsa_enc (
    .clk, .rst(reset), .start(rsa_enc_start),
    .data_in(msg_s), .key_exp(rsa_e), .key_n(rsa_n),
    .data_out(ct_s), .err(enc_err), .busy(enc_busy), .done(rsa_enc_done)
  );

  sha1_engine #(.MSG_BITS(DATA_W)) u_sha_s (
    .clk, .rst(reset), .start(sha_s_start), .msg(msg_s),
    .digest(dig_s), .busy(sha_s_busy), .done(sha_s_done)
  );

  dsa_sign #(.P_W(P_W), .Q_W(Q_W), .H_W(160)) u_sign (
    .clk, .rst(reset), .start(sign_start),
    .p(dsa_p), .q(dsa_q), .g(dsa_g), .x(dsa_x), .k(dsa_k), .h(dig_s),
    .r(sig_r), .s(sig_s), .err(sign_err), .busy(sign_busy), .done(sign_done)
  );

  // ---------------- receiver module ----------------
  logic [DATA_W-1:0] pt_r;
  logic [159:0]      dig_r;
  logic              dec_err, ver_valid, dec_busy, sha_r_busy, ver_busy;

  rsa_core #(.W(DATA_W)) u_rsa_dec (
    .clk, .rst(reset), .start(rsa_dec_start),
    .data_in(ct_r), .key_exp(rsa_d), .key_n(rsa_n),
    .data_out(pt_r), .err(dec_err), .busy(dec_busy), .done(rsa_dec_done)
  );

  sha1_engine #(.MSG_BITS(DATA_W)) u_sha_r (
    .clk, .rst(reset), .start(sha_r_start), .msg(pt_r),
    .digest(dig_r), .busy(sha_r_busy), .done(sha_r_done)
  );

  dsa_verify #(.P_W(P_W), .Q_W(Q_W), .H_W(160)) u_verify (
    .clk, .rst(reset), .start(verify_start),
    .p(dsa_p), .q(dsa_q), .g(dsa_g), .y(dsa_y), .h(dig_r),
    .r(r_rx), .s(s_rx),
    .valid(ver_valid), .busy(ver_busy), .done(verify_done)
  );

  // ---------------- output selection ----------------
  always_comb begin
    if (!mode) begin
      data_out = ct_s;
      r_out    = DATA_W'(sig_r);
      s_out    = DATA_W'(sig_s);
      digest   = dig_s;
      valid    = 1'b0;
      err      = done_s && (enc_err || sign_err);
      done     = done_s;
    end else begin
      data_out = pt_r;
      r_out    = DATA_W'(r_rx);
      s_out    = DATA_W'(s_rx);
      digest   = dig_r;
      valid    = done_r && ver_valid && !dec_err;
      err      = done_r && dec_err;
      done     = done_r;
    end
  end

  // each side runs its engines strictly one after another (the FSM order)
  a_sender_seq:   assert property (@(posedge clk) disable iff (reset)
                                   $onehot0({enc_busy, sha_s_busy, sign_busy}));
  a_receiver_seq: assert property (@(posedge clk) disable iff (reset)
                                   $onehot0({dec_busy, sha_r_busy, ver_busy}));
  // a finished side rests in its idle state
  a_done_s_idle:  assert property (@(posedge clk) disable iff (reset)
                                   done_s |-> state_s == crypto_pkg::IDLE);
  a_done_r_idle:  assert property (@(posedge clk) disable iff (reset)
                                   done_r |-> state_r == crypto_pkg::IDLE_R);

endmodule
