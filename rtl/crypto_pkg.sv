// crypto_pkg: sizes and constants shared by the hybrid RSA / DSA / SHA-1
// processor.
//
// RSA_W is the RSA modulus and data-bus width: the top's data_in/data_out
// buses are 512 bits wide, as in the simulation waveforms of the design.
// DSA_P_W and DSA_Q_W are the DSA prime sizes. The signature components r
// and s are q bits long and the published sample signatures have 160 bits,
// which fixes q at 160 bits (the SHA-1 digest size). The 512-bit p is this
// design's own choice, matching the bus width. SHA-1 constants follow
// FIPS 180-4.
package crypto_pkg;

  parameter int unsigned RSA_W    = 512;
  parameter int unsigned DSA_P_W  = 512;
  parameter int unsigned DSA_Q_W  = 160;
  parameter int unsigned DIGEST_W = 160;

  // SHA-1 initial hash value H(0)
  parameter logic [159:0] SHA1_IV = 160'h67452301_EFCDAB89_98BADCFE_10325476_C3D2E1F0;

  // SHA-1 round constant for round t (0..79)
  function automatic logic [31:0] sha1_k(input logic [6:0] t);
    if (t < 7'd20)      return 32'h5A827999;
    else if (t < 7'd40) return 32'h6ED9EBA1;
    else if (t < 7'd60) return 32'h8F1BBCDC;
    else                return 32'hCA62C1D6;
  endfunction

  // SHA-1 round function f_t(b,c,d)
  function automatic logic [31:0] sha1_f(input logic [6:0] t,
                                         input logic [31:0] b, c, d);
    if (t < 7'd20)      return (b & c) | (~b & d);
    else if (t < 7'd40) return b ^ c ^ d;
    else if (t < 7'd60) return (b & c) | (b & d) | (c & d);
    else                return b ^ c ^ d;
  endfunction

  // States of the sender control FSM
  typedef enum logic [2:0] {
    IDLE, START_RSA, WAIT_RSA, START_SHA, WAIT_SHA, START_SIGN, WAIT_SIGN, DONE
  } sender_state_t;

  // States of the receiver control FSM
  typedef enum logic [2:0] {
    IDLE_R, START_RSA_DECRYPT, WAIT_RSA_DECRYPT, START_SHA_R, WAIT_SHA_R,
    START_VERIFY, WAIT_VERIFY, DONE_R
  } receiver_state_t;

endpackage
