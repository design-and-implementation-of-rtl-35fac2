// crypto_ctrl: the central control unit of the processor, holding the
// sender FSM and the receiver FSM.
//
// Sender   : IDLE -> START_RSA -> WAIT_RSA -> START_SHA -> WAIT_SHA ->
//            START_SIGN -> WAIT_SIGN -> DONE -> IDLE
// Receiver : IDLE_R -> START_RSA_DECRYPT -> WAIT_RSA_DECRYPT -> START_SHA_R
//            -> WAIT_SHA_R -> START_VERIFY -> WAIT_VERIFY -> DONE_R -> IDLE_R
// Each START_* state issues a one-cycle start pulse to its engine; the
// matching WAIT_* state holds until that engine's done pulse. The two FSMs
// are independent, so a sending and a receiving run may overlap.
//
// Interface: start_s / start_r are sampled in IDLE / IDLE_R (a pulse is
// enough). done_s / done_r rise when DONE / DONE_R is reached and stay high
// until the next start of that FSM. busy_s / busy_r are high outside the
// idle states.
// Timing: each FSM adds 2 cycles per engine plus 1 for DONE on top of the
// engines' own latencies.
//
// The state names and their order are the document's. The document lists
// the states as sequences; that each START_* state lasts one cycle, that
// each WAIT_* state waits for a done pulse and that done stays high after
// the run are this design's choices.
module crypto_ctrl
  import crypto_pkg::*;
(
  input  logic clk,
  input  logic rst,
  // sender side
  input  logic start_s,
  input  logic rsa_enc_done,
  input  logic sha_s_done,
  input  logic sign_done,
  output logic rsa_enc_start,
  output logic sha_s_start,
  output logic sign_start,
  output logic busy_s,
  output logic done_s,
  output sender_state_t state_s,
  // receiver side
  input  logic start_r,
  input  logic rsa_dec_done,
  input  logic sha_r_done,
  input  logic verify_done,
  output logic rsa_dec_start,
  output logic sha_r_start,
  output logic verify_start,
  output logic busy_r,
  output logic done_r,
  output receiver_state_t state_r
);

  // ---------------- sender FSM ----------------
  sender_state_t nxt_s;

  always_comb begin
    nxt_s = state_s;
    unique case (state_s)
      IDLE:       if (start_s)      nxt_s = START_RSA;
      START_RSA:                    nxt_s = WAIT_RSA;
      WAIT_RSA:   if (rsa_enc_done) nxt_s = START_SHA;
      START_SHA:                    nxt_s = WAIT_SHA;
      WAIT_SHA:   if (sha_s_done)   nxt_s = START_SIGN;
      START_SIGN:                   nxt_s = WAIT_SIGN;
      WAIT_SIGN:  if (sign_done)    nxt_s = DONE;
      DONE:                         nxt_s = IDLE;
      default:                      nxt_s = IDLE;
    endcase
  end

  assign rsa_enc_start = (state_s == START_RSA);
  assign sha_s_start   = (state_s == START_SHA);
  assign sign_start    = (state_s == START_SIGN);
  assign busy_s        = (state_s != IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_s <= IDLE;
      done_s  <= 1'b0;
    end else begin
      state_s <= nxt_s;
      if (state_s == IDLE && start_s) done_s <= 1'b0;
      else if (state_s == DONE)       done_s <= 1'b1;
    end
  end

  // ---------------- receiver FSM ----------------
  receiver_state_t nxt_r;

  always_comb begin
    nxt_r = state_r;
    unique case (state_r)
      IDLE_R:            if (start_r)      nxt_r = START_RSA_DECRYPT;
      START_RSA_DECRYPT:                   nxt_r = WAIT_RSA_DECRYPT;
      WAIT_RSA_DECRYPT:  if (rsa_dec_done) nxt_r = START_SHA_R;
      START_SHA_R:                         nxt_r = WAIT_SHA_R;
      WAIT_SHA_R:        if (sha_r_done)   nxt_r = START_VERIFY;
      START_VERIFY:                        nxt_r = WAIT_VERIFY;
      WAIT_VERIFY:       if (verify_done)  nxt_r = DONE_R;
      DONE_R:                              nxt_r = IDLE_R;
      default:                             nxt_r = IDLE_R;
    endcase
  end

  assign rsa_dec_start = (state_r == START_RSA_DECRYPT);
  assign sha_r_start   = (state_r == START_SHA_R);
  assign verify_start  = (state_r == START_VERIFY);
  assign busy_r        = (state_r != IDLE_R);

  always_ff @(posedge clk) begin
    if (rst) begin
      state_r <= IDLE_R;
      done_r  <= 1'b0;
    end else begin
      state_r <= nxt_r;
      if (state_r == IDLE_R && start_r) done_r <= 1'b0;
      else if (state_r == DONE_R)       done_r <= 1'b1;
    end
  end

  // a WAIT state must not see a done from an engine it has not started
  property p_wait_rsa;  @(posedge clk) disable iff (rst) rsa_enc_done |-> state_s == WAIT_RSA;  endproperty
  property p_wait_sign; @(posedge clk) disable iff (rst) sign_done    |-> state_s == WAIT_SIGN; endproperty
  property p_wait_ver;  @(posedge clk) disable iff (rst) verify_done  |-> state_r == WAIT_VERIFY; endproperty
  a_wait_rsa:  assert property (p_wait_rsa);
  a_wait_sign: assert property (p_wait_sign);
  a_wait_ver:  assert property (p_wait_ver);

endmodule
