// sha1_engine: SHA-1 hash (FIPS 180-4) of a fixed-length message.
//
// The message is a MSG_BITS-bit value, most significant bit first (for the
// processor: the 512-bit plaintext M as 64 big-endian bytes). The engine
//   * preprocesses: appends the 1 bit, zero fill and the 64-bit length,
//     giving NBLK 512-bit blocks (2 for a 512-bit message);
//   * schedules: a 16-word window holds W(t)..W(t+15); each round shifts it
//     and appends W(t+16) = rotl1(W(t+13)^W(t+8)^W(t+2)^W(t));
//   * compresses: one of the 80 rounds per clock cycle;
//   * adds the working variables into H after each block, giving the
//     160-bit digest H0..H4 (H0 in the top bits).
//
// Interface: start pulse captures msg; done pulses one cycle with digest
// valid, digest holds until the next start.
// Timing: done comes NBLK * 82 cycles after start (1 load cycle, 80
// rounds and 1 add cycle per block).
//
// The four steps are those the document lists; one round per cycle and the
// fixed message length are this design's choices.
module sha1_engine
  import crypto_pkg::*;
#(
  parameter int unsigned MSG_BITS = crypto_pkg::RSA_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic [MSG_BITS-1:0] msg,
  output logic [159:0]        digest,
  output logic                busy,
  output logic                done
);

  localparam int unsigned NBLK  = (MSG_BITS + 65 + 511) / 512;
  localparam int unsigned PAD_W = NBLK * 512;
  localparam int unsigned BW    = (NBLK > 1) ? $clog2(NBLK) : 1;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_ROUND, S_ADD} state_t;

  state_t              state;
  logic [MSG_BITS-1:0] msg_r;
  logic [PAD_W-1:0]    padded;
  logic [BW-1:0]       blk;
  logic [6:0]          t;
  logic [31:0]         w [16];
  logic [31:0]         h [5];
  logic [31:0]         a, b, c, d, e;

  // message preprocessing (padding)
  always_comb begin
    padded = '0;
    padded[PAD_W-1 -: MSG_BITS] = msg_r;
    padded[PAD_W-1-MSG_BITS]    = 1'b1;
    padded[63:0]                = 64'(MSG_BITS);
  end

  logic [511:0] block;
  assign block = padded[PAD_W - 1 - 512 * blk -: 512];

  // one compression round
  logic [31:0] temp, w_next;
  always_comb begin
    temp   = {a[26:0], a[31:27]} + sha1_f(t, b, c, d) + e + sha1_k(t) + w[0];
    w_next = w[13] ^ w[8] ^ w[2] ^ w[0];
    w_next = {w_next[30:0], w_next[31]};
  end

  assign busy   = (state != S_IDLE);
  assign digest = {h[0], h[1], h[2], h[3], h[4]};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      done  <= 1'b0;
      msg_r <= '0;
      blk   <= '0;
      t     <= '0;
      {a, b, c, d, e} <= '0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
      for (int i = 0; i < 5; i++)  h[i] <= SHA1_IV[159 - 32*i -: 32];
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          msg_r <= msg;
          blk   <= '0;
          for (int i = 0; i < 5; i++) h[i] <= SHA1_IV[159 - 32*i -: 32];
          state <= S_LOAD;
        end
        S_LOAD: begin
          for (int i = 0; i < 16; i++) w[i] <= block[511 - 32*i -: 32];
          {a, b, c, d, e} <= {h[0], h[1], h[2], h[3], h[4]};
          t     <= '0;
          state <= S_ROUND;
        end
        S_ROUND: begin
          e <= d;
          d <= c;
          c <= {b[1:0], b[31:2]};
          b <= a;
          a <= temp;
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= w_next;
          t <= t + 1'b1;
          if (t == 7'd79) state <= S_ADD;
        end
        S_ADD: begin
          h[0] <= h[0] + a;
          h[1] <= h[1] + b;
          h[2] <= h[2] + c;
          h[3] <= h[3] + d;
          h[4] <= h[4] + e;
          if (blk == BW'(NBLK - 1)) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            blk   <= blk + 1'b1;
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // handshake rules: a start while busy would be ignored, and done only
  // ends a run that is in progress
  a_no_start_when_busy: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
  a_done_when_idle:     assert property (@(posedge clk) disable iff (rst) done  |-> !busy);

endmodule
