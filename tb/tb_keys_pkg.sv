// tb_keys_pkg: test keys, expected results and reference arithmetic for the
// testbenches.
//
// RSA: a 512-bit modulus n = p1*p2 from two 256-bit primes, e = 65537,
// d = e^-1 mod (p1-1)(p2-1). DSA: 160-bit prime q, 512-bit prime
// p = m*q + 1, g = 2^((p-1)/q) mod p, private key x, public key
// y = g^x mod p, fixed nonce K. The expected ciphertexts, digests and
// signatures were computed with independent big-integer arithmetic and a
// reference SHA-1, for messages taken as 64 big-endian bytes.
package tb_keys_pkg;

  localparam logic [511:0] RSA_N = 512'hb0eae6910fea841c205168a0b8350eb895fc788ddb3e3c10c27ba5bff84270a71b734bb2a9bb956c91dfa1faa6d4f2e842e9f66db5b01b99e20581c41844a2bb;
  localparam logic [511:0] RSA_E = 512'h10001;
  localparam logic [511:0] RSA_D = 512'h2125b1d3660f03779d9a8326f1bc872890798040dbde1a34edab6b0fbfbcfb0c14174f54deebd5cffa17a0dbc4c61d587513dfa157ffa37eba46de199a147ef9;
  localparam logic [511:0] DSA_P = 512'h871693e0c01d6ec81089786f5d640231ddde40cb517a0dae9c6645306ecdb87ba1cb398a147d8ef02387b08f72808894e36ee63eec1bb8156c5ca2467e58ebb5;
  localparam logic [159:0] DSA_Q = 160'hc076c7e05009f96e40234b14945dc068e9ede9e3;
  localparam logic [511:0] DSA_G = 512'h559028ef69cb7c5ae5cf6b297381a0f127da7f5a41952b252199fc40fae126914ab172c41dec6e9bb3a46906020099e656c404619da36bf5698bea57e8b2cf5b;
  localparam logic [159:0] DSA_X = 160'ha56bd54748bdfd451a0990814766d97e63448063;
  localparam logic [511:0] DSA_Y = 512'h44ead44a3b044b02e67ce1515c82ac8b8614d7870d10780ab4d68c9eaf0d19f493b59c3dbdfa3aded86125692225131557bdeada5b653510f7d74d1c101f7c8e;
  localparam logic [159:0] DSA_K = 160'h1d3a5c7e9b2f4a6c8e0b1d3f5a7c9e2b4d6f8a0c;

  typedef struct packed {
    logic [511:0] m;   // plaintext
    logic [511:0] c;   // m^e mod n
    logic [159:0] h;   // SHA-1 of m as 64 big-endian bytes
    logic [159:0] r;   // DSA signature with nonce DSA_K
    logic [159:0] s;
  } vector_t;

  localparam int NVEC = 3;
  localparam vector_t VEC [NVEC] = '{
    '{m: 512'h5,
      c: 512'h52fdc690e182a68347789fd4ed7bd0722af1d99059b4cd8a153323077e8bc1afba4aa9ddfbff6ff53830c9d2cce0d4718024e003f874b7e13e6e26ad8e34499b,
      h: 160'ha537bf735d0cad566f50e09b2d93f306d86ac34d,
      r: 160'ha6fb48c8371939483ff56f437f1486b09a083e0,
      s: 160'ha3aada9adc5ed5639e9750bd2bd1826ce6f41a49},
    '{m: 512'ha,
      c: 512'h6d22291c53c115e7b77219774a40046484b06b69a4f8d5daa2b83061054c583ed7efbcc28aa0e2aad7d5ed4e5a199258b7ed61c0cf630aa73c5a98bc11fed7ec,
      h: 160'heaedd6de83abd910fd8d256455446f8345d8ba7b,
      r: 160'ha6fb48c8371939483ff56f437f1486b09a083e0,
      s: 160'h3a18f89ab0a28b593c9260546f88e19673a5449a},
    '{m: 512'h123456789abcdef,
      c: 512'hfe3a0c85cc7ef583e7582ea8542c03b46a09afa189f928b51da142d88cc2990aa946625b2583102110faa692dd5bbd949bb044446dcbfc54e1a5060bff2dd65,
      h: 160'h1ab42257851dc7637d95fd623f7a635b1d49fcbf,
      r: 160'ha6fb48c8371939483ff56f437f1486b09a083e0,
      s: 160'h7a369122f8980d8f9b098863b18bc83977ea3e8e}
  };

  // reference modular exponentiation with plain wide-integer arithmetic
  function automatic logic [511:0] ref_modexp(input logic [511:0] b,
                                              input logic [511:0] e,
                                              input logic [511:0] n);
    logic [1023:0] acc, bb, nn;
    acc = 1024'd1 % {512'd0, n};
    bb  = {512'd0, b} % {512'd0, n};
    nn  = {512'd0, n};
    for (int i = 511; i >= 0; i--) begin
      acc = (acc * acc) % nn;
      if (e[i]) acc = (acc * bb) % nn;
    end
    return acc[511:0];
  endfunction

  // random value below n (n > 0)
  function automatic logic [511:0] rand_below(input logic [511:0] n);
    logic [1023:0] v;
    for (int i = 0; i < 32; i++) v[32*i +: 32] = $urandom;
    return 512'(v % {512'd0, n});
  endfunction

endpackage
