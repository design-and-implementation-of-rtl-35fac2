# Hybrid RSA / DSA / SHA-1 cryptographic processor

This processor puts three public-key security services into one piece of hardware
that sits at both ends of a link:

* **Sender (mode 0).** The plaintext `M` is encrypted with the receiver's RSA public key,
  `C = M^e mod n`. `M` is hashed with SHA-1, and the digest is signed with DSA, which
  gives `(r, s)`. The triple `(C, r, s)` is transmitted. RSA gives confidentiality.
  The signature gives authenticity and non-repudiation.
* **Receiver (mode 1).** `C` is decrypted with the receiver's private key,
  `M = C^d mod n`. The recovered `M` is hashed again, and `(r, s)` is checked against that
  digest with the sender's DSA public key `y`. `valid = 1` means that the message is the
  one the sender signed and that it reached the receiver unchanged.

All public-key arithmetic runs on Montgomery multipliers, so no divider is built. The
design follows the hybrid RSA–DSA–SHA1 processor described in the paper "Design and
Implementation of a Hybrid RSA–DSA–SHA1 Cryptographic Processor for Secure Data
Communication Using Verilog HDL". The paper specifies:

* the blocks;
* the formulas;
* the two control sequences;
* the two modes;
* the port names and the 512-bit buses of the top.

The paper does not give the circuits inside the blocks. Those are this implementation's,
and the places where it had to choose are listed below.

## Data flow

```
            sender side (mode 0)                               receiver side (mode 1)
 data_in=M ─┬─> rsa_core (e,n) ───────────> C ══╗   ╔══> data_in=C ─> rsa_core (d,n) ─> M ─┬─> data_out
            └─> sha1_engine ─> H(M) ─┐          ║ C ║                                      └─> sha1_engine ─> H(M)
                                     └─> dsa_sign (p,q,g,x,k) ─> r,s ══ r,s ══> r_in,s_in ─> dsa_verify (p,q,g,y) ─> valid
```

`crypto_top` contains both sides. Each side has its own RSA unit, SHA-1 engine and DSA
unit. The central controller `crypto_ctrl` runs one state machine per side:

| sender FSM | receiver FSM | action |
|---|---|---|
| `IDLE` | `IDLE_R` | wait for start |
| `START_RSA` / `WAIT_RSA` | `START_RSA_DECRYPT` / `WAIT_RSA_DECRYPT` | encrypt / decrypt |
| `START_SHA` / `WAIT_SHA` | `START_SHA_R` / `WAIT_SHA_R` | hash the plaintext |
| `START_SIGN` / `WAIT_SIGN` | `START_VERIFY` / `WAIT_VERIFY` | sign / verify |
| `DONE` | `DONE_R` | raise done, return to idle |

Each `START_*` state lasts one cycle and sends a start pulse to its engine. The matching
`WAIT_*` state waits for that engine's `done` pulse. The three operations therefore run
one after another. The two state machines are independent, so one device can sign an
outgoing message while it checks an incoming one. `mode` only chooses which side drives
the outputs.

## The arithmetic

This is the largest part of the design, and the hardest to follow. There are four
engines, and each uses one handshake: a one-cycle `start` pulse captures the operands,
`busy` is high while the engine works, and `done` pulses for one cycle when `res` is
valid. `res` then holds until the next start.

### `mont_mul`: Montgomery product

`res = a·b·2^-W mod n`, for an odd `n` and `a, b < n`. The unit takes one bit of `a` per
clock, starting with the least significant bit:

```
S = 0
for i in 0..W-1:  S = S + a_i·b ;  if S odd: S = S + n ;  S = S / 2
if S >= n: S = S - n
```

Adding `n` when `S` is odd makes the sum even, so the halving is exact. After `W` steps
`S < 2n`, and a single subtraction finishes the reduction. The accumulator is `W+2` bits
wide. The latency is `W + 1` cycles after the start cycle: 513 cycles for 512 bits.

### `mod_exp`: exponentiation

`res = base^exp mod n`, on one `mont_mul`:

1. **R2.** Compute `2^(2W) mod n` by `2W` doublings, each followed by a conditional
   subtraction, one per cycle. This constant converts operands into Montgomery form.
2. **Convert.** `x = Mont(1, R2) = R mod n`, which is "1" in Montgomery form. Then
   `a = Mont(base, R2)`.
3. **Scan.** Skip the leading zero bits of the exponent, one cycle per bit. For
   `e = 65537`, only the top 17 bits of a 512-bit exponent word then cost multiplications.
4. **Square and multiply.** Work left to right: `x = Mont(x,x)` for every remaining bit,
   then `x = Mont(x,a)` if the bit is 1.
5. **Leave Montgomery form.** `res = Mont(x, 1)`.

The requirements are `n` odd, `n > 1` and `base < n`. `exp = 0` gives 1.

### Helpers for DSA

* **`mod_reduce`** computes `x mod n` by restoring shift-and-subtract, one bit of `x` per
  cycle. It reduces `g^k mod p`, `v` and the digest modulo `q`.
* **`mod_mul`** computes `a·b mod n` as `Mont(Mont(a,b), R2)`. It recomputes its own `R2`
  each time, in `2W` cycles.
* **Inverses** mod `q` (`k^-1`, `s^-1`) are computed as `k^(q-2) mod q`, by Fermat's
  theorem. This needs `q` to be prime, and it reuses `mod_exp`.

### DSA

`dsa_sign` works through these steps:

```
t = g^k mod p         r = t mod q
kinv = k^(q-2) mod q  hm = H mod q
xr = x·r mod q        s = kinv·(hm + xr) mod q
```

`err` is set if `r` or `s` comes out 0. The DSA standard then asks for a new nonce.

`dsa_verify` works through these steps:

1. Reject unless `0 < r < q` and `0 < s < q`.
2. `w = s^(q-2)`, `u1 = H·w`, `u2 = r·w`, all mod `q`.
3. `a = g^u1`, `b = y^u2`, `v = (a·b mod p) mod q`.
4. `valid = (v == r)`.

Both units use separate engines for the two moduli: a `mod_exp` with a `P_W`-bit
modulus and a `Q_W`-bit exponent, a `Q_W`-bit `mod_exp`, `mod_mul` units and one
`mod_reduce`. The steps run one at a time.

## SHA-1 engine

`sha1_engine` implements FIPS 180-4 SHA-1 for a message of fixed length `MSG_BITS`. The
message's first byte is in the top bits. The processor hashes the 512-bit plaintext word
as 64 big-endian bytes. Padding (the 1 bit, zero fill and the 64-bit length) is wired
logic, and it gives two 512-bit blocks. A 16-word window holds `W(t)..W(t+15)` and
appends `rotl1(W(t+13)^W(t+8)^W(t+2)^W(t))` each round. One round runs per cycle, so each
block takes 82 cycles: 1 load cycle, 80 rounds and 1 add cycle. A 512-bit message takes
164 cycles. `digest = {H0,H1,H2,H3,H4}`.

## Top-level interface (`crypto_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | clock; synchronous reset, active high |
| `mode` | in | 1 | 0 = sender, 1 = receiver: chooses which side drives the outputs and what `start` starts |
| `start` | in | 1 | one-cycle pulse that starts the side chosen by `mode` |
| `start_r` | in | 1 | one-cycle pulse that starts the receiver in either mode |
| `data_in` | in | `DATA_W` | plaintext (sender) or ciphertext (receiver), captured on the start cycle |
| `r_in`, `s_in` | in | `Q_W` | received signature, captured with the receiver's start |
| `rsa_n`, `rsa_e`, `rsa_d` | in | `DATA_W` | receiver's RSA key |
| `dsa_p`, `dsa_g`, `dsa_y` | in | `P_W` | DSA prime, generator, sender's public key |
| `dsa_q`, `dsa_x`, `dsa_k` | in | `Q_W` | DSA prime `q`, sender's private key, nonce |
| `data_out` | out | `DATA_W` | `C` (mode 0) or recovered `M` (mode 1) |
| `r_out`, `s_out` | out | `DATA_W` | signature produced (mode 0) or received (mode 1), zero-extended |
| `digest` | out | 160 | SHA-1 digest of the chosen side |
| `valid` | out | 1 | mode 1 only: the signature checks out |
| `err` | out | 1 | RSA operand rejected (`data_in >= n`, `n` even), or `r`/`s` = 0 when signing |
| `done` | out | 1 | the chosen side has finished; stays high until that side is started again |

Hold the keys stable while a side is busy, because the engines read them when they start.
Every engine asserts its handshake rules: no `start` while it is busy, and no `done`
outside a run. `crypto_ctrl` asserts that an engine's `done` arrives only in the `WAIT_*`
state that waits for it. The DSA units and the top assert that their engines are busy
one at a time. Simulate with assertions enabled (`--assert`) to check these
rules.

At the default sizes, a sender run with `e = 65537` takes about 181 k cycles, of which
`g^k mod p` takes most. A receiver run with a full 512-bit `d` takes about 700 k cycles.
The RSA decryption and the two exponentiations mod `p` take most of that.

Parameters (`crypto_pkg`, top parameters):

| name | default | origin |
|---|---|---|
| `DATA_W` / `RSA_W` | 512 | the published design's 512-bit `data_in`/`data_out`/`r_out`/`s_out` buses |
| `Q_W` | 160 | `r` and `s` are `q` bits long, and the published sample signatures have 160 bits |
| digest | 160 | SHA-1 |
| `P_W` | 512 | this implementation's choice, matching the bus width |

After coarse synthesis, the whole top has about 52.6 k flip-flop bits. Most of them are
operand and result registers of 512-bit engines. No multiplier arrays are built.

## Departures and own choices

The following points are not in the source description, or differ from it:

* **Sequential operation.** The source text says the sender's three operations run
  "simultaneously", but its state machine lists them one after another. The state
  machine is what is built.
* **Key inputs.** Keys and the DSA nonce `k` are input ports. No key storage, key
  generation or random number generator is described, so none is built.
* **Added ports.** `r_in`/`s_in`, `err` and `digest` are additions. In receiver mode,
  `r_out`/`s_out` echo the received signature, as the published receiver log shows.
* **What is hashed.** The hashed message is the 512-bit plaintext word as 64 bytes. The
  source only says that the plaintext is hashed.
* **Not reproducible.** The published sample outputs (ciphertext, `r`, `s` for plaintext
  5) cannot be reproduced, because the keys behind them are not published. The testbenches
  use their own 512-bit RSA key and 512/160-bit DSA parameters.
* **Overlapping runs.** The two sides may run at the same time. `start_r` starts the
  receiver in either mode.
* **Rejected messages.** When verification fails, `data_out` still shows the decrypted
  value and `valid` stays 0. Dropping the rejected message is left to whatever reads the
  outputs.

## What this is not

This is a functional model of the published architecture, not a secure product:

* The RSA is textbook RSA, with no padding.
* SHA-1 and 512-bit RSA are no longer considered secure.
* The exponentiation's running time depends on the exponent's bits. It skips leading
  zeros and multiplies only on 1 bits, so the time leaks information about `d` and `k`.
* The DSA nonce must be secret, random and never reused. That is left to whoever drives
  `dsa_k`.

## Files

* `rtl/crypto_pkg.sv`: sizes, SHA-1 constants and functions, FSM state types
* `rtl/mont_mul.sv`, `rtl/mod_exp.sv`, `rtl/mod_mul.sv`, `rtl/mod_reduce.sv`: modular arithmetic
* `rtl/rsa_core.sv`: RSA encryption/decryption unit, used once per side
* `rtl/sha1_engine.sv`: SHA-1
* `rtl/dsa_sign.sv`, `rtl/dsa_verify.sv`: DSA
* `rtl/crypto_ctrl.sv`: sender and receiver state machines
* `rtl/crypto_top.sv`: the processor
* `tb/tb_keys_pkg.sv`: test keys, expected results, reference big-integer exponentiation
* `tb/tb_<block>.sv`: one self-checking testbench per block; `tb/tb_mod_arith.sv` tests
  `mod_mul` and `mod_reduce` directly

## Verification and simulation

Each testbench checks its block against values computed independently of the RTL:

* ciphertexts, digests and signatures computed with separate big-integer and SHA-1 code;
* published SHA-1 test vectors;
* for random operands, reference arithmetic written with SystemVerilog wide-integer `%`.

Every testbench prints `TB_RESULT checks=N failures=M`. Where a latency is fixed, the
testbench checks it too: `mont_mul` takes `W+1` cycles, and SHA-1 takes 82 cycles per
block.

`tb_crypto_top` runs the full-size processor end to end. It runs the two published test
cases (plaintexts 5 and 10), from sender through to receiver. It then checks:

* a foreign signature and a corrupted ciphertext are rejected;
* a plaintext `>= n` is flagged;
* overlapping sender and receiver runs both complete correctly;
* each of these mechanisms happened at least once.

It takes about 15 s with Verilator.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/crypto_pkg.sv tb/tb_keys_pkg.sv -y rtl -y tb tb/tb_crypto_top.sv \
  --top-module tb_crypto_top -Mdir obj_top
./obj_top/Vtb_crypto_top
```

Replace `tb_crypto_top` with any other `tb_*` name to run that testbench. To lint a
module: `verilator --lint-only -Wall rtl/crypto_pkg.sv -y rtl rtl/<module>.sv`.

To try other sizes, override `DATA_W`, `P_W` and `Q_W` on `crypto_top`, and supply keys
of matching size. The RSA modulus and `q` must be odd, and `q` must be prime. Simulation
time grows roughly with the cube of the width.
